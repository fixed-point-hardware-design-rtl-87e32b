// tb_hilbert: Hilbert block at NT_FFT = 32, NX = 4, NZ = 16. A random
// compounded half-spectrum C (with factor c_s_in = 3) is expanded and
// inverse-transformed in real arithmetic in the testbench:
//   h[z] = sum_l C*[l] exp(+j 2 pi l z / N), C*[0] = C[0]/2,
//   C*[l] = C[l] (0 < l < N/2), C*[N/2] = C[N/2-1]/2, 0 above.
// Every Re/Im(H) * 2^h_s must lie within 1 % of the peak magnitude, and each
// Abs(H) must equal floor(sqrt(re^2 + im^2)) of the stored Re/Im. A second
// call with the overflow flag set must return the same
// true values (C is halved and its factor raised by one).
module tb_hilbert;
  import stolt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NT = 32, NX = 4, NZ = 16, NTH = NT/2;
  localparam real PI = 3.14159265358979323846;

  logic start, busy, done, of_in, fft_busy, c_ren, h_ren;
  scale_t c_s_in, h_s;
  logic [$clog2(NTH*NX)-1:0] c_raddr;
  logic signed [23:0] c_rq_re, c_rq_im, h_wd_re, h_wd_im, h_rq_re, h_rq_im;
  logic [2:0] h_we;
  logic [$clog2(NT*NX)-1:0] h_waddr, h_raddr;
  logic [23:0] h_wd_abs;

  hilbert #(.NT_FFT(NT), .NX(NX), .NZ(NZ)) dut (.*);

  logic signed [23:0] cre [NTH*NX], cim [NTH*NX];
  logic signed [23:0] hre [NT*NX], him [NT*NX];
  logic [23:0]        habs [NT*NX];
  always_ff @(posedge clk) begin
    if (c_ren) begin c_rq_re <= cre[c_raddr]; c_rq_im <= cim[c_raddr]; end
    if (h_ren) begin h_rq_re <= hre[h_raddr]; h_rq_im <= him[h_raddr]; end
    if (h_we[0]) hre[h_waddr] <= h_wd_re;
    if (h_we[1]) him[h_waddr] <= h_wd_im;
    if (h_we[2]) habs[h_waddr] <= h_wd_abs;
  end

  real rr [NZ][NX], ri [NZ][NX];

  task automatic call(input int of);
    real peak, tol;
    @(negedge clk); c_s_in = 8'd3; of_in = of[0]; start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    peak = 0;
    for (int x = 0; x < NX; x++) for (int z = 0; z < NZ; z++) begin
      real m; m = $sqrt(rr[z][x]**2 + ri[z][x]**2); if (m > peak) peak = m;
    end
    tol = 0.01 * peak;
    for (int x = 0; x < NX; x++)
      for (int z = 0; z < NZ; z++) begin
        real gr, gi; longint sq, r;
        gr = hre[x*NT + z] / 4194304.0 * (2.0 ** h_s);
        gi = him[x*NT + z] / 4194304.0 * (2.0 ** h_s);
        checks++;
        if ((gr-rr[z][x]) > tol || (rr[z][x]-gr) > tol || (gi-ri[z][x]) > tol || (ri[z][x]-gi) > tol) begin
          failures++;
          if (failures < 10) $display("FAIL H[%0d][%0d] got (%f,%f) exp (%f,%f)", z, x, gr, gi, rr[z][x], ri[z][x]);
        end
        sq = longint'(hre[x*NT+z])*hre[x*NT+z] + longint'(him[x*NT+z])*him[x*NT+z];
        r = 0;
        for (int b = 24; b >= 0; b--) if ((r | (64'd1 << b)) * (r | (64'd1 << b)) <= sq) r = r | (64'd1 << b);
        checks++;
        if (longint'(habs[x*NT+z]) != r) begin failures++; $display("FAIL abs %0d vs %0d", habs[x*NT+z], r); end
      end
  endtask

  initial begin
    int hs0;
    start = 0; of_in = 0; c_s_in = 0;
    for (int a = 0; a < NTH*NX; a++) begin
      cre[a] = 24'(int'($urandom_range(0, 1 << 22)) - (1 << 21));
      cim[a] = 24'(int'($urandom_range(0, 1 << 22)) - (1 << 21));
    end
    for (int x = 0; x < NX; x++)
      for (int z = 0; z < NZ; z++) begin
        rr[z][x] = 0; ri[z][x] = 0;
        for (int l = 0; l <= NTH; l++) begin
          real vr, vi;
          if (l == 0)        begin vr = cre[x*NTH] / 2.0;         vi = cim[x*NTH] / 2.0; end
          else if (l == NTH) begin vr = cre[x*NTH+NTH-1] / 2.0;   vi = cim[x*NTH+NTH-1] / 2.0; end
          else               begin vr = cre[x*NTH+l];             vi = cim[x*NTH+l]; end
          vr = vr / 4194304.0 * 8.0; vi = vi / 4194304.0 * 8.0;   // factor 2^3
          rr[z][x] += vr*$cos(2*PI*l*z/NT) - vi*$sin(2*PI*l*z/NT);
          ri[z][x] += vr*$sin(2*PI*l*z/NT) + vi*$cos(2*PI*l*z/NT);
        end
      end
    repeat (3) @(negedge clk); rst_n = 1;
    call(0);
    hs0 = h_s;
    // with the overflow flag C is halved and its factor raised: same values
    call(1);
    checks++;
    if (int'(h_s) < hs0) begin failures++; $display("FAIL h_s %0d after %0d", h_s, hs0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
