// tb_fft_bfp: self-checking test of the block-scaled FFT.
// Two instances are exercised: a 64-point 16-bit (Q1.14) one and a 32-point
// 24-bit (Q1.22) one. Random complex inputs in [-1,1) and a single tone are
// loaded, the transform is run, and every output bin times 2^smax is compared
// with a direct DFT computed in real arithmetic. The start-to-done cycle
// count is checked against N/2*log2(N)*2 + 1.
module tb_fft_bfp;
  import stolt_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int N1 = 64, W1 = 16, F1 = 14;
  localparam int N2 = 32, W2 = 24, F2 = 22;

  // instance 1
  logic in_we1; logic [$clog2(N1)-1:0] in_addr1, ra1, rb1;
  logic signed [W1-1:0] in_re1, in_im1, re_a1, im_a1, re_b1, im_b1;
  logic start1, busy1, done1; scale_t smax1;
  fft_bfp #(.N(N1), .W(W1), .FRAC(F1)) u1 (
    .clk, .rst_n, .in_we(in_we1), .in_addr(in_addr1), .in_re(in_re1), .in_im(in_im1),
    .start(start1), .busy(busy1), .done(done1), .smax(smax1),
    .rd_addr_a(ra1), .rd_re_a(re_a1), .rd_im_a(im_a1),
    .rd_addr_b(rb1), .rd_re_b(re_b1), .rd_im_b(im_b1));

  // instance 2
  logic in_we2; logic [$clog2(N2)-1:0] in_addr2, ra2, rb2;
  logic signed [W2-1:0] in_re2, in_im2, re_a2, im_a2, re_b2, im_b2;
  logic start2, busy2, done2; scale_t smax2;
  fft_bfp #(.N(N2), .W(W2), .FRAC(F2)) u2 (
    .clk, .rst_n, .in_we(in_we2), .in_addr(in_addr2), .in_re(in_re2), .in_im(in_im2),
    .start(start2), .busy(busy2), .done(done2), .smax(smax2),
    .rd_addr_a(ra2), .rd_re_a(re_a2), .rd_im_a(im_a2),
    .rd_addr_b(rb2), .rd_re_b(re_b2), .rd_im_b(im_b2));

  real xr[N1], xi[N1];
  localparam real PI = 3.14159265358979323846;

  function automatic int rnd_q(int fr);
    // uniform in [-1, 1) with fr fraction bits
    return int'($urandom_range(0, (2 << fr) - 1)) - (1 << fr);
  endfunction

  task automatic run1(input int mode);
    int cyc; real er, ei, gr, gi, tol, maxerr;
    for (int n = 0; n < N1; n++) begin
      int vr, vi;
      if (mode == 0) begin vr = rnd_q(F1); vi = rnd_q(F1); end
      else begin
        vr = int'($floor(0.9 * $cos(2*PI*5*n/N1) * (1<<F1)));
        vi = int'($floor(0.9 * $sin(2*PI*5*n/N1) * (1<<F1)));
      end
      xr[n] = real'(vr) / (1<<F1); xi[n] = real'(vi) / (1<<F1);
      @(negedge clk); in_we1 = 1; in_addr1 = n[5:0]; in_re1 = W1'(vr); in_im1 = W1'(vi);
    end
    @(negedge clk); in_we1 = 0; start1 = 1;
    @(negedge clk); start1 = 0; cyc = 1;
    while (!done1) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != N1/2*$clog2(N1)*2 + 1) begin
      failures++; $display("FAIL fft64 latency %0d", cyc);
    end
    maxerr = 0;
    for (int k = 0; k < N1; k++) begin
      @(negedge clk); ra1 = k[5:0]; rb1 = 6'(N1-1-k);
      @(negedge clk);
      er = 0; ei = 0;
      for (int n = 0; n < N1; n++) begin
        er += xr[n]*$cos(2*PI*k*n/N1) + xi[n]*$sin(2*PI*k*n/N1);
        ei += xi[n]*$cos(2*PI*k*n/N1) - xr[n]*$sin(2*PI*k*n/N1);
      end
      gr = real'(re_a1) / (1<<F1) * (2.0**smax1);
      gi = real'(im_a1) / (1<<F1) * (2.0**smax1);
      tol = 8.0 * (2.0**smax1) / (1<<F1);
      checks++;
      if ((gr-er) > tol || (er-gr) > tol || (gi-ei) > tol || (ei-gi) > tol) begin
        failures++;
        $display("FAIL fft64 mode%0d bin %0d got (%f,%f) exp (%f,%f) smax %0d", mode, k, gr, gi, er, ei, smax1);
      end
    end
    // port B returns the mirrored bin consistently with port A
    @(negedge clk); ra1 = 6'd3; rb1 = 6'd3;
    @(negedge clk); checks++;
    if (re_a1 != re_b1 || im_a1 != im_b1) begin failures++; $display("FAIL port B mismatch"); end
  endtask

  task automatic run2();
    int cyc; real er, ei, gr, gi, tol; real yr[N2], yi[N2];
    for (int n = 0; n < N2; n++) begin
      int vr, vi;
      vr = rnd_q(F2); vi = rnd_q(F2);
      yr[n] = real'(vr) / (1<<F2); yi[n] = real'(vi) / (1<<F2);
      @(negedge clk); in_we2 = 1; in_addr2 = n[4:0]; in_re2 = W2'(vr); in_im2 = W2'(vi);
    end
    @(negedge clk); in_we2 = 0; start2 = 1;
    @(negedge clk); start2 = 0; cyc = 1;
    while (!done2) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != N2/2*$clog2(N2)*2 + 1) begin failures++; $display("FAIL fft32 latency %0d", cyc); end
    for (int k = 0; k < N2; k++) begin
      @(negedge clk); rb2 = k[4:0]; ra2 = '0;
      @(negedge clk);
      er = 0; ei = 0;
      for (int n = 0; n < N2; n++) begin
        er += yr[n]*$cos(2*PI*k*n/N2) + yi[n]*$sin(2*PI*k*n/N2);
        ei += yi[n]*$cos(2*PI*k*n/N2) - yr[n]*$sin(2*PI*k*n/N2);
      end
      gr = real'(re_b2) / (1<<F2) * (2.0**smax2);
      gi = real'(im_b2) / (1<<F2) * (2.0**smax2);
      tol = 8.0 * (2.0**smax2) / (1<<14);   // twiddles are Q1.14
      checks++;
      if ((gr-er) > tol || (er-gr) > tol || (gi-ei) > tol || (ei-gi) > tol) begin
        failures++;
        $display("FAIL fft32 bin %0d got (%f,%f) exp (%f,%f)", k, gr, gi, er, ei);
      end
    end
  endtask

  initial begin
    in_we1 = 0; start1 = 0; ra1 = '0; rb1 = '0; in_addr1 = '0; in_re1 = '0; in_im1 = '0;
    in_we2 = 0; start2 = 0; ra2 = '0; rb2 = '0; in_addr2 = '0; in_re2 = '0; in_im2 = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    run1(0);
    run1(1);
    run1(0);
    run2();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
