// tb_cordic_rotator: streams random samples and phases (including the
// folded ranges |phase| >= 1/2 and the wrap beyond +-1) through the pipelined
// rotator, one per cycle, and compares each output with
// (re + j im) * exp(j*pi*phase) computed in real arithmetic. Also checks the
// NITER + 2 cycle latency.
module tb_cordic_rotator;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NS = 400, LAT = 16;
  localparam real PI = 3.14159265358979323846;

  logic in_valid, out_valid;
  logic signed [15:0] in_re, in_im, in_phase, out_re, out_im;
  cordic_rotator #(.W(16), .NITER(14)) dut (.*);

  real er[NS], ei[NS];
  int sent = 0, got = 0, first_out = -1, cyc = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      real gr, gi;
      if (first_out < 0) first_out = cyc;
      gr = real'(out_re) / 16384.0; gi = real'(out_im) / 16384.0;
      checks++;
      if ((gr-er[got]) > 0.002 || (er[got]-gr) > 0.002 || (gi-ei[got]) > 0.002 || (ei[got]-gi) > 0.002) begin
        failures++;
        $display("FAIL sample %0d got (%f,%f) exp (%f,%f)", got, gr, gi, er[got], ei[got]);
      end
      got++;
    end
  end

  initial begin
    int start_cyc;
    in_valid = 0; in_re = 0; in_im = 0; in_phase = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk);
    start_cyc = cyc;
    for (int s = 0; s < NS; s++) begin
      int r, i, p; real ph, xr, xi;
      r = int'($urandom_range(0, 2*11000)) - 11000;
      i = int'($urandom_range(0, 2*11000)) - 11000;
      p = int'($urandom_range(0, 65535)) - 32768;   // full Q3.12 range [-8,8)
      if (s == 0) begin r = 16384; i = 0; p = 2048; end   // +1 rotated by pi/2
      if (s == 1) begin r = 0; i = 16384; p = 4096; end   // j rotated by pi
      xr = r / 16384.0; xi = i / 16384.0; ph = p / 4096.0;
      er[s] = xr*$cos(PI*ph) - xi*$sin(PI*ph);
      ei[s] = xr*$sin(PI*ph) + xi*$cos(PI*ph);
      in_valid = 1; in_re = 16'(r); in_im = 16'(i); in_phase = 16'(p);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (LAT + 4) @(negedge clk);
    checks++;
    if (got != NS) begin failures++; $display("FAIL count %0d", got); end
    checks++;
    if (first_out - start_cyc != LAT) begin failures++; $display("FAIL latency %0d", first_out - start_cyc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
