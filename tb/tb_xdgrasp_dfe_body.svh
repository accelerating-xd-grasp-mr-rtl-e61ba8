// Shared body of the end-to-end testbenches of xdgrasp_dfe. The including module
// defines the sizes (NPX, NPY, NTRES, NC, NX, NLINE, P, FIFO_DEPTH) and instantiates the
// design as "dut" with the signals declared here.
//
// Sequence, following one pass of the conjugate-gradient loop on the FPGA side:
//  1. multiplication of kdatau and wu (the type 1 NUFFT input of one phase and coil)
//  2. objective: memory stream leads, host stream lags   -> queue stalls, a full queue
//  3. post_nufft_type2: host stream leads, memory lags    -> queue stalls
//  4. combine_across_coils (halve = 0), giving the data gradient image of a phase
//  5. grad on that image for the first, a middle and the last phase
//  6. update: x - step * gradient, with the dot product
//  7. transposed_multiplication of the updated image for a middle and the last phase
//  8. combine_across_coils again with halve = 1
// Every output is compared with a double-precision reference computed from the values
// the testbench fed in. Each mechanism (queue stall, full queue, both halve modes, the
// three gradient phase cases, the last-phase TV rule, LOAD/EMIT switches of both buffer
// kernels, lane replication when P > 1) is counted, and one that never happened is a
// failure.

  localparam int NPIX = NPX * NPY;
  localparam int NSMP = NX * NLINE;
  localparam real PI  = 3.14159265358979323846;

  logic                     clk = 1'b0, rst = 1'b1;
  logic [$clog2(NTRES)-1:0] r = '0;
  fp32_t                    l1smooth = '0, tv_weight = '0, scale_a = '0, scale_b = '0;
  logic                     halve = 1'b0;
  logic  mult_valid = 1'b0, mult_last = 1'b0;
  cplx_t mult_kdatau [P];
  fp32_t mult_wu [P];
  logic  mult_out_valid, mult_out_last;
  cplx_t mult_out [P];
  logic  obj_x_valid = 1'b0, obj_x_last = 1'b0, obj_m_valid = 1'b0;
  cplx_t obj_x [P], obj_kdatau [P];
  fp32_t obj_wu [P];
  logic  obj_x_full, obj_m_full, obj_stall, obj_out_valid;
  fp32_t obj_out;
  logic  post_x_valid = 1'b0, post_x_last = 1'b0, post_m_valid = 1'b0;
  cplx_t post_x [P], post_kdatau [P];
  fp32_t post_wu [P];
  logic  post_x_full, post_m_full, post_stall, post_out_valid, post_out_last;
  cplx_t post_out [P];
  logic  upd_valid = 1'b0, upd_last = 1'b0;
  cplx_t upd_a [P], upd_b [P];
  logic  upd_out_valid, upd_out_last, upd_conj_valid;
  cplx_t upd_out [P];
  cplx_t upd_conj_mult;
  logic  grad_valid = 1'b0, grad_last = 1'b0;
  cplx_t grad_l2grad [P], grad_x [P], grad_xprev [P], grad_xnext [P];
  logic  grad_out_valid, grad_out_last, grad_conj_valid;
  cplx_t grad_res [P];
  fp32_t grad_conj_mult;
  logic  tmul_x_valid = 1'b0, tmul_b1_valid = 1'b0;
  cplx_t tmul_x [P], tmul_xnext [P], tmul_b1 [P];
  logic  tmul_loading, tmul_tv_valid, tmul_out_valid, tmul_out_last;
  fp32_t tmul_tv_out;
  cplx_t tmul_out [P];
  logic  comb_x_valid = 1'b0, comb_b1_valid = 1'b0;
  cplx_t comb_x;
  cplx_t comb_b1 [NC];
  logic  comb_loading, comb_out_valid, comb_out_last;
  cplx_t comb_out;

  int checks = 0, failures = 0, cycle = 0;
  cplx_t b1q [$];
  // mechanism counters
  int n_obj_stall = 0, n_post_stall = 0, n_full = 0, n_halve0 = 0, n_halve1 = 0;
  int n_first = 0, n_middle = 0, n_last = 0, n_tv_last = 0, n_tmul_sw = 0, n_comb_sw = 0;

  // images handed from kernel to kernel
  cplx_t img_l2grad [NPIX], img_grad [NPIX], img_x [NPIX], img_upd [NPIX];

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst) begin
      if (obj_stall)  n_obj_stall++;
      if (post_stall) n_post_stall++;
      if (obj_m_full || post_x_full) n_full++;
    end
  end

  task automatic check_c(string what, cplx_t got, real wr, real wi, real tol, real scale);
    checks++;
    if (!close(fp_to_real(got.re), wr, tol, scale) || !close(fp_to_real(got.im), wi, tol, scale)) begin
      failures++;
      if (failures < 20)
        $display("%s mismatch: got %g,%g want %g,%g", what, fp_to_real(got.re),
                 fp_to_real(got.im), wr, wi);
    end
  endtask

  task automatic check_r(string what, fp32_t got, real want, real tol, real scale);
    checks++;
    if (!close(fp_to_real(got), want, tol, scale)) begin
      failures++;
      $display("%s mismatch: got %g want %g", what, fp_to_real(got), want);
    end
  endtask

  function automatic real re_of(cplx_t c);
    return fp_to_real(c.re);
  endfunction
  function automatic real im_of(cplx_t c);
    return fp_to_real(c.im);
  endfunction

  // ------------------------------------------------------------------ 1 multiplication
  task automatic t_mult(int beats);
    cplx_t kd [$];
    fp32_t w [$];
    int got = 0;
    fork
      begin
        for (int b = 0; b < beats; b++) begin
          @(negedge clk);
          mult_valid = 1'b1;
          mult_last  = (b == beats - 1);
          for (int p = 0; p < P; p++) begin
            mult_kdatau[p] = rnd_c();
            mult_wu[p]     = to_fp(rnd());
            kd.push_back(mult_kdatau[p]);
            w.push_back(mult_wu[p]);
          end
        end
        @(negedge clk);
        mult_valid = 1'b0;
      end
      begin
        while (got < beats) begin
          @(posedge clk);
          if (mult_out_valid) begin
            for (int p = 0; p < P; p++) begin
              cplx_t k;
              real ww;
              k  = kd.pop_front();
              ww = fp_to_real(w.pop_front());
              check_c("mult", mult_out[p], re_of(k) * ww, im_of(k) * ww, 1e-6, 1e-30);
            end
            got++;
            checks++;
            if (mult_out_last != (got == beats)) failures++;
          end
        end
      end
    join
  endtask

  // ------------------------------------------------------------------ 2/3 objective, post
  // lead_mem: the memory stream starts first and fills its queue before the host starts
  task automatic t_obj_post(int beats, bit is_obj, bit lead_mem);
    cplx_t xs [$], kds [$];
    fp32_t ws [$];
    real   want = 0.0;
    int    got = 0;
    for (int i = 0; i < beats * P; i++) begin
      xs.push_back(rnd_c());
      kds.push_back(rnd_c());
      ws.push_back(to_fp(rnd() * 2.0));
    end
    fork
      begin : mem_side
        if (!lead_mem) repeat (FIFO_DEPTH + 3) @(negedge clk);
        for (int b = 0; b < beats; b++) begin
          @(negedge clk);
          while (is_obj ? obj_m_full : post_m_full) begin
            if (is_obj) obj_m_valid = 1'b0; else post_m_valid = 1'b0;
            @(negedge clk);
          end
          for (int p = 0; p < P; p++) begin
            if (is_obj) begin
              obj_kdatau[p] = kds[b * P + p]; obj_wu[p] = ws[b * P + p];
            end else begin
              post_kdatau[p] = kds[b * P + p]; post_wu[p] = ws[b * P + p];
            end
          end
          if (is_obj) obj_m_valid = 1'b1; else post_m_valid = 1'b1;
        end
        @(negedge clk);
        obj_m_valid = 1'b0;
        post_m_valid = 1'b0;
      end
      begin : host_side
        if (lead_mem) repeat (FIFO_DEPTH + 3) @(negedge clk);
        for (int b = 0; b < beats; b++) begin
          @(negedge clk);
          while (is_obj ? obj_x_full : post_x_full) begin
            if (is_obj) obj_x_valid = 1'b0; else post_x_valid = 1'b0;
            @(negedge clk);
          end
          for (int p = 0; p < P; p++) begin
            if (is_obj) obj_x[p] = xs[b * P + p]; else post_x[p] = xs[b * P + p];
          end
          if (is_obj) begin
            obj_x_valid = 1'b1; obj_x_last = (b == beats - 1);
          end else begin
            post_x_valid = 1'b1; post_x_last = (b == beats - 1);
          end
        end
        @(negedge clk);
        obj_x_valid = 1'b0;
        post_x_valid = 1'b0;
      end
      begin : collect
        if (is_obj) begin
          for (int i = 0; i < beats * P; i++) begin
            real zr, zi, w;
            w  = fp_to_real(ws[i]);
            zr = re_of(xs[i]) * w - re_of(kds[i]);
            zi = im_of(xs[i]) * w - im_of(kds[i]);
            want += zr * zr + zi * zi;
          end
          do @(posedge clk); while (!obj_out_valid);
          check_r("objective", obj_out, want, sum_tol(beats), 1e-20);
        end else begin
          while (got < beats * P) begin
            @(posedge clk);
            if (post_out_valid) begin
              for (int p = 0; p < P; p++) begin
                real w, zr, zi;
                w  = fp_to_real(ws[got]);
                zr = re_of(xs[got]) * w - re_of(kds[got]);
                zi = im_of(xs[got]) * w - im_of(kds[got]);
                check_c("post", post_out[p], zr * w, zi * w, 1e-5,
                        (rabs(re_of(xs[got]) * w) + rabs(im_of(xs[got]) * w) +
                         rabs(re_of(kds[got])) + rabs(im_of(kds[got]))) * rabs(w) + 1e-30);
                got++;
              end
            end
          end
        end
      end
    join
  endtask

  // ------------------------------------------------------------------ 4/8 combine
  task automatic t_comb(bit h);
    cplx_t xs [];
    real   c;
    int    got = 0;
    xs = new[NC * NPIX];
    halve = h;
    if (h) n_halve1++; else n_halve0++;
    c = real'(NX) * PI / real'(NLINE) / (h ? 2.0 : 1.0);
    checks++;
    if (!comb_loading) failures++;
    for (int i = 0; i < NC * NPIX; i++) begin
      @(negedge clk);
      comb_x_valid = 1'b1;
      comb_x = rnd_c();
      xs[i] = comb_x;
    end
    @(negedge clk);
    comb_x_valid = 1'b0;
    checks++;
    if (comb_loading) failures++; else n_comb_sw++;
    fork
      begin
        for (int i = 0; i < NPIX; i++) begin
          real num = 0.0, dr = 0.0, di = 0.0, d2;
          comb_b1_valid = 1'b1;
          for (int k = 0; k < NC; k++) begin
            real br, bi;
            comb_b1[k] = rnd_c();
            br = re_of(comb_b1[k]); bi = im_of(comb_b1[k]);
            num += br * br + bi * bi;
            dr  += re_of(xs[k * NPIX + i]) * br - im_of(xs[k * NPIX + i]) * bi;
            di  += re_of(xs[k * NPIX + i]) * bi + im_of(xs[k * NPIX + i]) * br;
          end
          d2 = dr * dr + di * di;
          img_l2grad[i] = '{re: to_fp(c * num * dr / d2), im: to_fp(-c * num * di / d2)};
          @(negedge clk);
        end
        comb_b1_valid = 1'b0;
      end
      begin
        while (got < NPIX) begin
          @(posedge clk);
          if (comb_out_valid) begin
            real wr, wi;
            wr = re_of(img_l2grad[got]);
            wi = im_of(img_l2grad[got]);
            check_c("combine", comb_out, wr, wi, 1e-4, rabs(wr) + rabs(wi) + 1e-30);
            img_l2grad[got] = comb_out;  // the RTL result feeds the next kernel
            got++;
            checks++;
            if (comb_out_last != (got == NPIX)) failures++;
          end
        end
      end
    join
    @(negedge clk);
    checks++;
    if (!comb_loading) failures++;
  endtask

  // ------------------------------------------------------------------ 5 grad
  task automatic t_grad(int phase);
    cplx_t xp [], xc [], xn [];
    real   sm, tw, acc = 0.0;
    int    got = 0;
    xp = new[NPIX]; xc = new[NPIX]; xn = new[NPIX];
    r  = ($clog2(NTRES))'(phase);
    sm = fp_to_real(l1smooth);
    tw = fp_to_real(tv_weight);
    if (phase == 0) n_first++;
    else if (phase == NTRES - 1) n_last++;
    else n_middle++;
    for (int i = 0; i < NPIX; i++) begin
      xp[i] = rnd_c(); xc[i] = img_x[i]; xn[i] = rnd_c();
    end
    fork
      begin
        for (int b = 0; b < NPIX / P; b++) begin
          @(negedge clk);
          grad_valid = 1'b1;
          grad_last  = (b == NPIX / P - 1);
          for (int p = 0; p < P; p++) begin
            grad_l2grad[p] = img_l2grad[b * P + p];
            grad_x[p]      = xc[b * P + p];
            grad_xprev[p]  = xp[b * P + p];
            grad_xnext[p]  = xn[b * P + p];
          end
        end
        @(negedge clk);
        grad_valid = 1'b0;
      end
      begin
        while (got < NPIX) begin
          @(posedge clk);
          if (grad_out_valid) begin
            for (int p = 0; p < P; p++) begin
              real d1r, d1i, d2r, d2i, n1, n2, vr, vi, gr, gi;
              d1r = re_of(xc[got]) - re_of(xp[got]); d1i = im_of(xc[got]) - im_of(xp[got]);
              d2r = re_of(xn[got]) - re_of(xc[got]); d2i = im_of(xn[got]) - im_of(xc[got]);
              n1 = $sqrt(d1r * d1r + d1i * d1i + sm);
              n2 = $sqrt(d2r * d2r + d2i * d2i + sm);
              if (phase == 0) begin
                vr = -d2r / n2; vi = -d2i / n2;
              end else if (phase == NTRES - 1) begin
                vr = d1r / n1; vi = d1i / n1;
              end else begin
                vr = d1r / n1 - d2r / n2; vi = d1i / n1 - d2i / n2;
              end
              gr = re_of(img_l2grad[got]) + tw * vr;
              gi = im_of(img_l2grad[got]) + tw * vi;
              acc += gr * gr + gi * gi;
              check_c("grad", grad_res[p], gr, gi, 1e-5,
                      rabs(re_of(img_l2grad[got])) + rabs(im_of(img_l2grad[got])) + 4.0 * rabs(tw) + 1e-30);
              img_grad[got] = grad_res[p];
              got++;
            end
          end
        end
        do @(posedge clk); while (!grad_conj_valid);
        check_r("grad norm", grad_conj_mult, acc, sum_tol(NPIX / P), 1e-20);
      end
    join
  endtask

  // ------------------------------------------------------------------ 6 update
  task automatic t_upd(real step);
    real sa, sb, dr = 0.0, di = 0.0, ds = 0.0;
    int  got = 0;
    scale_a = to_fp(1.0);
    scale_b = to_fp(-step);
    sa = fp_to_real(scale_a);
    sb = fp_to_real(scale_b);
    fork
      begin
        for (int b = 0; b < NPIX / P; b++) begin
          @(negedge clk);
          upd_valid = 1'b1;
          upd_last  = (b == NPIX / P - 1);
          for (int p = 0; p < P; p++) begin
            upd_a[p] = img_x[b * P + p];
            upd_b[p] = img_grad[b * P + p];
          end
        end
        @(negedge clk);
        upd_valid = 1'b0;
      end
      begin
        while (got < NPIX) begin
          @(posedge clk);
          if (upd_out_valid) begin
            for (int p = 0; p < P; p++) begin
              real ar, ai, br, bi, orr, oi, sc;
              ar = re_of(img_x[got]); ai = im_of(img_x[got]);
              br = re_of(img_grad[got]); bi = im_of(img_grad[got]);
              orr = ar * sa + br * sb;
              oi  = ai * sa + bi * sb;
              sc  = rabs(ar * sa) + rabs(ai * sa) + rabs(br * sb) + rabs(bi * sb) + 1e-30;
              check_c("update", upd_out[p], orr, oi, 1e-5, sc);
              dr += orr * ar + oi * ai;
              di += oi * ar - orr * ai;
              ds += sc * (rabs(ar) + rabs(ai));
              img_upd[got] = upd_out[p];
              got++;
            end
          end
        end
        do @(posedge clk); while (!upd_conj_valid);
        check_c("update dot", upd_conj_mult, dr, di, sum_tol(NPIX / P), ds);
      end
    join
  endtask

  // ------------------------------------------------------------------ 7 transposed mult
  task automatic t_tmul(int phase);
    cplx_t xn [];
    real   sm, tv = 0.0;
    int    got = 0;
    xn = new[NPIX];
    r  = ($clog2(NTRES))'(phase);
    sm = fp_to_real(l1smooth);
    if (phase == NTRES - 1) n_tv_last++;
    checks++;
    if (!tmul_loading) failures++;
    for (int i = 0; i < NPIX; i++) begin
      real dr, di;
      xn[i] = rnd_c();
      dr = (phase == NTRES - 1) ? 0.0 : re_of(xn[i]) - re_of(img_upd[i]);
      di = (phase == NTRES - 1) ? 0.0 : im_of(xn[i]) - im_of(img_upd[i]);
      tv += $sqrt(dr * dr + di * di + sm);
    end
    fork
      begin
        for (int b = 0; b < NPIX / P; b++) begin
          @(negedge clk);
          tmul_x_valid = 1'b1;
          for (int p = 0; p < P; p++) begin
            tmul_x[p]     = img_upd[b * P + p];
            tmul_xnext[p] = xn[b * P + p];
          end
        end
        @(negedge clk);
        tmul_x_valid = 1'b0;
      end
      begin
        do @(posedge clk); while (!tmul_tv_valid);
        check_r("tv", tmul_tv_out, tv, sum_tol(NPIX / P), 1e-20);
      end
    join
    @(negedge clk);
    checks++;
    if (tmul_loading) failures++; else n_tmul_sw++;
    fork
      begin
        for (int b = 0; b < NPIX / P; b++) begin
          tmul_b1_valid = 1'b1;
          for (int p = 0; p < P; p++) begin
            tmul_b1[p] = rnd_c();
            b1q.push_back(tmul_b1[p]);
          end
          @(negedge clk);
        end
        tmul_b1_valid = 1'b0;
      end
      begin
        while (got < NPIX) begin
          @(posedge clk);
          if (tmul_out_valid) begin
            for (int p = 0; p < P; p++) begin
              cplx_t bb, xx;
              real ar, ai, br, bi;
              bb = b1q.pop_front();
              xx = img_upd[(got % NPY) * NPX + got / NPY];  // column-major read of x
              ar = re_of(xx); ai = im_of(xx); br = re_of(bb); bi = im_of(bb);
              check_c("transposed mult", tmul_out[p], ar * br - ai * bi, ar * bi + ai * br, 1e-5,
                      (rabs(ar) + rabs(ai)) * (rabs(br) + rabs(bi)) + 1e-30);
              got++;
            end
            checks++;
            if (tmul_out_last != (got == NPIX)) failures++;
          end
        end
      end
    join
    @(negedge clk);
    checks++;
    if (!tmul_loading) failures++;
  endtask

  // ------------------------------------------------------------------ whole sequence
  initial begin
    for (int p = 0; p < P; p++) begin
      mult_kdatau[p] = '0; mult_wu[p] = '0; obj_x[p] = '0; obj_kdatau[p] = '0; obj_wu[p] = '0;
      post_x[p] = '0; post_kdatau[p] = '0; post_wu[p] = '0; upd_a[p] = '0; upd_b[p] = '0;
      grad_l2grad[p] = '0; grad_x[p] = '0; grad_xprev[p] = '0; grad_xnext[p] = '0;
      tmul_x[p] = '0; tmul_xnext[p] = '0; tmul_b1[p] = '0;
    end
    comb_x = '0;
    for (int k = 0; k < NC; k++) comb_b1[k] = '0;
    for (int i = 0; i < NPIX; i++) img_x[i] = rnd_c();
    l1smooth  = to_fp(1e-3);
    tv_weight = to_fp(0.25);
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    t_mult(NSMP / P);
    t_obj_post(NSMP / P, 1'b1, 1'b1);
    t_obj_post(NSMP / P, 1'b0, 1'b0);
    t_comb(1'b0);
    t_grad(NTRES / 2);
    t_grad(0);
    t_grad(NTRES - 1);
    t_upd(0.5);
    t_tmul(NTRES / 2);
    t_tmul(NTRES - 1);
    t_comb(1'b1);
    repeat (5) @(negedge clk);
    // every mechanism must have happened
    checks += 11;
    if (n_obj_stall == 0)  begin failures++; $display("objective queue never stalled"); end
    if (n_post_stall == 0) begin failures++; $display("post queue never stalled"); end
    if (n_full == 0)       begin failures++; $display("no queue ever filled"); end
    if (n_halve0 == 0)     begin failures++; $display("halve = 0 never used"); end
    if (n_halve1 == 0)     begin failures++; $display("halve = 1 never used"); end
    if (n_first == 0)      begin failures++; $display("first-phase gradient never used"); end
    if (n_middle == 0)     begin failures++; $display("middle-phase gradient never used"); end
    if (n_last == 0)       begin failures++; $display("last-phase gradient never used"); end
    if (n_tv_last == 0)    begin failures++; $display("last-phase TV rule never used"); end
    if (n_tmul_sw == 0)    begin failures++; $display("transposed mult never switched"); end
    if (n_comb_sw == 0)    begin failures++; $display("combine never switched"); end
    $display("mechanisms: obj_stall=%0d post_stall=%0d full=%0d halve0=%0d halve1=%0d first=%0d middle=%0d last=%0d tv_last=%0d tmul_sw=%0d comb_sw=%0d lanes=%0d",
             n_obj_stall, n_post_stall, n_full, n_halve0, n_halve1, n_first, n_middle,
             n_last, n_tv_last, n_tmul_sw, n_comb_sw, P);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
