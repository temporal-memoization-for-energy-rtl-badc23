// tm_workload_tb: the floating-point work of two evaluated kernels, a Sobel
// edge filter (error-tolerant, approximate matching) and a one-dimensional
// Haar wavelet transform (error-intolerant, exact matching), run through the
// execute stage at its default size with timing errors injected.
//
// A generated 18x18 grey image (flat regions and a step edge, as in real
// pictures, so neighbouring work-items see the same operands) is filtered
// one output pixel per work-item: lane l computes column l of the 16x16
// interior. Each filter step is one vector instruction issued to every lane:
//   MULADD  2*R+UR, 2*L+UL, 2*D+DL, 2*U+UL   (weighted neighbour sums)
//   ADD     the third neighbour of each sum, then gx = right-left and
//           gy = bottom-top (sign flipped by the issuing code)
//   MUL     gx*gx;  MULADD gy*gy + gx*gx;  SQRT magnitude;  FP2FIX to integer
// The filter is run three times:
//   1  clean image, exact matching: every result must equal the reference
//      computed with the same operation order and rounding
//   2  image with small noise in the low fraction bits, exact matching
//   3  the same noisy image with the 12 low fraction bits masked
//      (approximate matching): magnitudes must stay within a tolerance of
//      the exact ones, and the LUT must hit more often than in run 2
//   4  Haar transform of a generated 512-sample piecewise-constant signal,
//      exact matching, five levels: per level ADD a+b and a-b for every
//      sample pair (pair p on lane p mod 16), then MUL by 1/sqrt(2). Every
//      coefficient must equal the reference computed with the same rounding
// Per stage error rate 1%. The hit rate, recoveries and masked errors of
// each run are printed; every run must see recoveries, and the runs that
// hit must see errors masked by hits.
module tm_workload_tb;
  import tm_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int L = 16, F = 6, W = 18, H = 18, ROWS = H - 2;
  localparam int MAXN = ROWS * 4;

  logic                           clk = 1'b0, rst_n = 1'b0;
  logic                           csr_we = 1'b0;
  logic [5:0]                     csr_addr = '0;
  logic [31:0]                    csr_wdata = '0, csr_rdata;
  logic [L-1:0][F-1:0]            in_valid = '0, in_ready;
  logic [L-1:0][F-1:0][2:0][31:0] in_ops = '0;
  logic [L-1:0][F-1:0][7:0]       in_tag = '0;
  logic [L-1:0][F-1:0][15:0]      stage_err = '0;
  logic [L-1:0][F-1:0]            out_valid, out_hit, error_pipe, masked_error, lut_write;
  logic [L-1:0][F-1:0][31:0]      out_q;
  logic [L-1:0][F-1:0][7:0]       out_tag;
  logic [L-1:0][F-1:0][14:0]      stage_gated;

  tm_exec_stage dut (
    .clk, .rst_n, .csr_we, .csr_addr, .csr_wdata, .csr_rdata,
    .in_valid, .in_ready, .in_ops, .in_tag, .stage_err,
    .out_valid, .out_q, .out_tag, .out_hit,
    .error_pipe, .masked_error, .lut_write, .stage_gated);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_hit = 0, n_res = 0, n_recov = 0, n_masked = 0;
  int err_permille = 10;

  // one vector instruction: per lane, n operand sets for unit f
  int               ph_f, ph_n;
  bit               ph_on = 1'b0;
  logic [2:0][31:0] ph_ops[L][MAXN];
  logic [31:0]      ph_res[L][MAXN];
  int               issued[L], done[L];
  int               pend[L][$];
  bit               csr_mask_approx = 1'b0;

  logic [31:0] img[H][W];
  logic [31:0] mag[L][ROWS], mag_exact[L][ROWS], pix[L][ROWS];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [31:0] reference(input int f, input logic [2:0][31:0] o);
    case (f)
      int'(FPU_ADD):    return ref_add(o[0], o[1]);
      int'(FPU_MUL):    return ref_mul(o[0], o[1]);
      int'(FPU_FP2FIX): return ref_fp2fix(o[0]);
      int'(FPU_SQRT):   return r2f($sqrt(f2r(o[0])));
      int'(FPU_RECIP):  return r2f(1.0 / f2r(o[0]));
      default:          return ref_muladd(o[0], o[1], o[2]);
    endcase
  endfunction

  task automatic csr_write(input int f, input csr_addr_e r, input logic [31:0] v);
    @(posedge clk); #2;
    csr_we = 1'b1; csr_addr = {3'(f), r}; csr_wdata = v;
    @(posedge clk); #2;
    csr_we = 1'b0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // handshake, results and event counts
  always @(negedge clk) if (rst_n && ph_on) begin
    for (int l = 0; l < L; l++) begin
      if (error_pipe[l][ph_f]) n_recov++;
      if (masked_error[l][ph_f]) n_masked++;
      if (out_valid[l][ph_f]) begin
        int i;
        check(pend[l].size() > 0, "result without instruction");
        if (pend[l].size() > 0) begin
          i = pend[l].pop_front();
          check(out_tag[l][ph_f] == 8'(i), "results in issue order");
          ph_res[l][i] = out_q[l][ph_f];
          n_res++;
          if (out_hit[l][ph_f]) n_hit++;
          done[l]++;
        end
      end
      if (in_valid[l][ph_f] && in_ready[l][ph_f]) begin
        pend[l].push_back(issued[l]);
        issued[l]++;
      end
    end
  end

  task automatic run_phase(input int f, input int n);
    bit all_done;
    ph_f = f;
    ph_n = n;
    for (int l = 0; l < L; l++) begin
      issued[l] = 0;
      done[l]   = 0;
      pend[l].delete();
    end
    ph_on = 1'b1;
    do begin
      @(posedge clk); #2;
      all_done = 1'b1;
      for (int l = 0; l < L; l++) begin
        in_valid[l][f] = issued[l] < n;
        in_tag[l][f]   = 8'(issued[l]);
        in_ops[l][f]   = (issued[l] < n) ? ph_ops[l][issued[l]] : '0;
        for (int s = 0; s < 16; s++)
          stage_err[l][f][s] = (s < int'(fpu_stages(fpu_kind_e'(f)))) &&
                               ($urandom_range(0, 999) < err_permille);
        if (done[l] < n) all_done = 1'b0;
      end
    end while (!all_done);
    in_valid  = '0;
    stage_err = '0;
    @(negedge clk);
    ph_on = 1'b0;
    // every result against the reference of its own operands; an
    // approximate hit may return the result of a nearby operand set
    for (int l = 0; l < L; l++) for (int i = 0; i < n; i++)
      if (csr_mask_approx == 1'b0)
        check(ph_res[l][i] == reference(f, ph_ops[l][i]),
              $sformatf("unit %0d lane %0d op %0d: got %h expected %h", f, l, i,
                        ph_res[l][i], reference(f, ph_ops[l][i])));
  endtask

  function automatic logic [31:0] neg(input logic [31:0] x);
    return {~x[31], x[30:0]};
  endfunction

  // the filter on the current image; results in mag[][] and pix[][]
  task automatic sobel();
    logic [31:0] two, r[L][ROWS], lf[L][ROWS], bt[L][ROWS], tp[L][ROWS];
    logic [31:0] gx[L][ROWS], gy[L][ROWS], s1[L][ROWS];
    two = 32'h4000_0000;
    // weighted sums: 2*R+UR, 2*L+UL, 2*D+DL, 2*U+UL
    for (int l = 0; l < L; l++) for (int y = 0; y < ROWS; y++) begin
      int cx, cy;
      cx = l + 1; cy = y + 1;
      // {c, b, a}: a*b + c with a the doubled neighbour and b = 2.0
      ph_ops[l][4*y]   = '{img[cy-1][cx+1], two, img[cy][cx+1]};
      ph_ops[l][4*y+1] = '{img[cy-1][cx-1], two, img[cy][cx-1]};
      ph_ops[l][4*y+2] = '{img[cy+1][cx-1], two, img[cy+1][cx]};
      ph_ops[l][4*y+3] = '{img[cy-1][cx-1], two, img[cy-1][cx]};
    end
    run_phase(int'(FPU_MULADD), 4 * ROWS);
    // third neighbour of each sum
    for (int l = 0; l < L; l++) for (int y = 0; y < ROWS; y++) begin
      int cx, cy;
      cx = l + 1; cy = y + 1;
      ph_ops[l][4*y]   = '{0, img[cy+1][cx+1], ph_res[l][4*y]};
      ph_ops[l][4*y+1] = '{0, img[cy+1][cx-1], ph_res[l][4*y+1]};
      ph_ops[l][4*y+2] = '{0, img[cy+1][cx+1], ph_res[l][4*y+2]};
      ph_ops[l][4*y+3] = '{0, img[cy-1][cx+1], ph_res[l][4*y+3]};
    end
    run_phase(int'(FPU_ADD), 4 * ROWS);
    for (int l = 0; l < L; l++) for (int y = 0; y < ROWS; y++) begin
      r[l][y]  = ph_res[l][4*y];
      lf[l][y] = ph_res[l][4*y+1];
      bt[l][y] = ph_res[l][4*y+2];
      tp[l][y] = ph_res[l][4*y+3];
    end
    // gradients
    for (int l = 0; l < L; l++) for (int y = 0; y < ROWS; y++) begin
      ph_ops[l][2*y]   = '{0, neg(lf[l][y]), r[l][y]};
      ph_ops[l][2*y+1] = '{0, neg(tp[l][y]), bt[l][y]};
    end
    run_phase(int'(FPU_ADD), 2 * ROWS);
    for (int l = 0; l < L; l++) for (int y = 0; y < ROWS; y++) begin
      gx[l][y] = ph_res[l][2*y];
      gy[l][y] = ph_res[l][2*y+1];
    end
    // magnitude
    for (int l = 0; l < L; l++) for (int y = 0; y < ROWS; y++)
      ph_ops[l][y] = '{0, gx[l][y], gx[l][y]};
    run_phase(int'(FPU_MUL), ROWS);
    for (int l = 0; l < L; l++) for (int y = 0; y < ROWS; y++) s1[l][y] = ph_res[l][y];
    for (int l = 0; l < L; l++) for (int y = 0; y < ROWS; y++)
      ph_ops[l][y] = '{s1[l][y], gy[l][y], gy[l][y]};
    run_phase(int'(FPU_MULADD), ROWS);
    for (int l = 0; l < L; l++) for (int y = 0; y < ROWS; y++)
      ph_ops[l][y] = '{0, 0, ph_res[l][y]};
    run_phase(int'(FPU_SQRT), ROWS);
    for (int l = 0; l < L; l++) for (int y = 0; y < ROWS; y++) begin
      mag[l][y]    = ph_res[l][y];
      ph_ops[l][y] = '{0, 0, ph_res[l][y]};
    end
    run_phase(int'(FPU_FP2FIX), ROWS);
    for (int l = 0; l < L; l++) for (int y = 0; y < ROWS; y++) pix[l][y] = ph_res[l][y];
  endtask

  // exact magnitude of the current image, in double precision
  function automatic real exact_mag(input int l, input int y);
    real p[3][3], gxr, gyr;
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) p[i][j] = f2r(img[y+i][l+j]);
    gxr = (p[0][2] + 2.0 * p[1][2] + p[2][2]) - (p[0][0] + 2.0 * p[1][0] + p[2][0]);
    gyr = (p[2][0] + 2.0 * p[2][1] + p[2][2]) - (p[0][0] + 2.0 * p[0][1] + p[0][2]);
    return $sqrt(gxr * gxr + gyr * gyr);
  endfunction

  // five levels of the Haar transform of sig[0..511]; coefficients in
  // hcoef[], level by level: details of level 1, then level 2, ...
  localparam int NSIG = 512;
  logic [31:0] sig[NSIG], hcoef[NSIG], href[NSIG];

  task automatic haar();
    logic [31:0] c, cur[NSIG], nxt[NSIG], rcur[NSIG], rnxt[NSIG];
    int n, o;
    c = r2f(1.0 / $sqrt(2.0));
    n = NSIG;
    o = 0;
    for (int i = 0; i < n; i++) begin
      cur[i]  = sig[i];
      rcur[i] = sig[i];
    end
    while (n / 2 >= L) begin
      for (int p = 0; p < n / 2; p++) begin
        ph_ops[p % L][2*(p / L)]   = '{0, cur[2*p+1], cur[2*p]};
        ph_ops[p % L][2*(p / L)+1] = '{0, neg(cur[2*p+1]), cur[2*p]};
      end
      run_phase(int'(FPU_ADD), n / L);
      for (int l = 0; l < L; l++) for (int i = 0; i < n / L; i++)
        ph_ops[l][i] = '{0, c, ph_res[l][i]};
      run_phase(int'(FPU_MUL), n / L);
      for (int p = 0; p < n / 2; p++) begin
        nxt[p]        = ph_res[p % L][2*(p / L)];
        hcoef[o + p]  = ph_res[p % L][2*(p / L)+1];
        rnxt[p]       = ref_mul(ref_add(rcur[2*p], rcur[2*p+1]), c);
        href[o + p]   = ref_mul(ref_add(rcur[2*p], neg(rcur[2*p+1])), c);
      end
      o = o + n / 2;
      n = n / 2;
      for (int i = 0; i < n; i++) begin
        cur[i]  = nxt[i];
        rcur[i] = rnxt[i];
      end
    end
    for (int i = 0; i < n; i++) begin
      hcoef[o + i] = cur[i];
      href[o + i]  = rcur[i];
    end
  endtask

  task automatic make_image(input bit noisy);
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      int v;
      v = (x < 9 ? 40 : 200) + 10 * (y / 6);
      if (y > 12 && x > 4 && x < 13) v = 120;
      img[y][x] = r2f(real'(v));
      if (noisy) img[y][x][7:0] = 8'($urandom);
    end
  endtask

  task automatic report(input string name, input int h0, input int r0, input int c0, input int m0,
                       input bit expect_hits);
    $display("%s: %0d results, hit rate %0d%%, %0d recoveries, %0d errors masked by hits",
             name, n_res - r0, 100 * (n_hit - h0) / (n_res - r0), n_recov - c0, n_masked - m0);
    check(n_recov > c0, {name, ": no recovery happened"});
    if (expect_hits) check(n_masked > m0, {name, ": no error was masked"});
  endtask

  initial begin
    int h0, r0, c0, m0, hits_exact, hits_approx;
    real worst;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // run 1: clean image, exact matching, results checked bit for bit
    make_image(1'b0);
    h0 = n_hit; r0 = n_res; c0 = n_recov; m0 = n_masked;
    sobel();
    for (int l = 0; l < L; l++) for (int y = 0; y < ROWS; y++)
      check(pix[l][y] == 32'($rtoi(exact_mag(l, y))),
            $sformatf("pixel (%0d,%0d) = %0d, expected %0d", l, y, pix[l][y], $rtoi(exact_mag(l, y))));
    report("clean image, exact", h0, r0, c0, m0, 1'b1);

    // run 2: noisy image, exact matching
    make_image(1'b1);
    h0 = n_hit; r0 = n_res; c0 = n_recov; m0 = n_masked;
    sobel();
    hits_exact = n_hit - h0;
    for (int l = 0; l < L; l++) for (int y = 0; y < ROWS; y++) mag_exact[l][y] = mag[l][y];
    report("noisy image, exact", h0, r0, c0, m0, 1'b0);

    // run 3: same image, 12 low fraction bits masked on every unit
    csr_mask_approx = 1'b1;
    for (int f = 0; f < F; f++) begin
      csr_write(f, CSR_CTRL, 32'd0);   // clear the tables
      csr_write(f, CSR_CTRL, 32'd3);
      csr_write(f, CSR_MASK, MASK_APPROX);
    end
    h0 = n_hit; r0 = n_res; c0 = n_recov; m0 = n_masked;
    sobel();
    hits_approx = n_hit - h0;
    worst = 0.0;
    for (int l = 0; l < L; l++) for (int y = 0; y < ROWS; y++) begin
      real d;
      d = f2r(mag[l][y]) - f2r(mag_exact[l][y]);
      if (d < 0.0) d = -d;
      if (d > worst) worst = d;
      check(d <= 1.0 + 0.01 * f2r(mag_exact[l][y]),
            $sformatf("approximate magnitude (%0d,%0d) %f, exact %f", l, y,
                      f2r(mag[l][y]), f2r(mag_exact[l][y])));
    end
    report("noisy image, approximate", h0, r0, c0, m0, 1'b1);
    $display("largest magnitude difference approximate vs exact: %f", worst);
    check(hits_approx > hits_exact, "approximate matching does not raise the hit count");

    // run 4: Haar wavelet, exact matching again
    csr_mask_approx = 1'b0;
    for (int f = 0; f < F; f++) begin
      csr_write(f, CSR_CTRL, 32'd0);
      csr_write(f, CSR_CTRL, 32'd3);
      csr_write(f, CSR_MASK, MASK_EXACT);
    end
    for (int i = 0; i < NSIG; i++)
      sig[i] = r2f(real'(8 * (i / 48) + ((i % 40) < 6 ? 5 : 0)));
    h0 = n_hit; r0 = n_res; c0 = n_recov; m0 = n_masked;
    haar();
    for (int i = 0; i < NSIG; i++)
      check(hcoef[i] == href[i], $sformatf("Haar coefficient %0d = %h, expected %h", i, hcoef[i], href[i]));
    report("Haar wavelet, exact", h0, r0, c0, m0, 1'b1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
