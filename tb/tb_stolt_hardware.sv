// tb_stolt_hardware: end-to-end test of the accelerator at a reduced size
// (NT_FFT = 64, NX_FFT = 16, NX = 8, NZ = 32). Three emission angles are
// processed with three calls, the C frame, its factor and the overflow flag
// being handed from one call to the next as the host would; last_flag is set
// on the third call only. Angles 1 and 2 use the same data, so that their
// sum leaves [-1, +1] and the overflow/compensation path must be taken.
//
// The testbench models the whole algorithm in real arithmetic: per angle
// direct DFTs along t and x, linear interpolation at M times A, inverse DFT
// along k_x and rotation by exp(j*pi*k_z*R[x]); the sum over angles; the
// analytic expansion and inverse DFT along k_z. Every Re/Im(H) * 2^h_s must
// lie within 2 % of the peak magnitude, and Abs(H) must match the stored
// Re/Im. It also counts how often each mechanism happened (each
// reconstruction step, compounding, hilbert, overflow flag, H written only
// on the last call) and fails on any that never did.
module tb_stolt_hardware;
  import stolt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NT = 64, NXF = 16, NX = 8, NZ = 32, NTH = NT/2, NMC = NXF/2 + 1, NA = 3;
  localparam real PI = 3.14159265358979323846;

  logic start, last_flag, of_in, busy, done, of_out;
  scale_t c_s_in, c_s_out, h_s_out;
  logic [3:0] rec_step; logic [3:0] active;
  logic p_en, ma_en, r_en, c_ren, c_we, h_ren;
  logic [$clog2(NT*NX)-1:0] p_addr_a, p_addr_b, h_waddr, h_raddr;
  logic signed [15:0] p_q_a, p_q_b, a_q, r_q;
  logic [$clog2(NTH*NMC)-1:0] ma_addr;
  logic [23:0] m_q, h_wd_abs;
  logic [$clog2(NX)-1:0] r_addr;
  logic [$clog2(NTH*NX)-1:0] c_raddr, c_waddr;
  logic signed [23:0] c_rq_re, c_rq_im, c_wd_re, c_wd_im, h_wd_re, h_wd_im, h_rq_re, h_rq_im;
  logic [2:0] h_we;

  stolt_hardware #(.NT_FFT(NT), .NX_FFT(NXF), .NX(NX), .NZ(NZ), .NITER(14)) dut (.*);

  // external memories (one angle's inputs at a time)
  logic signed [15:0] pmem [NT*NX];
  logic [23:0]        mmem [NTH*NMC];
  logic signed [15:0] amem [NTH*NMC];
  logic signed [15:0] rmem [NX];
  logic signed [23:0] cre [NTH*NX], cim [NTH*NX];
  logic signed [23:0] hre [NT*NX], him [NT*NX];
  logic [23:0]        habs [NT*NX];
  always_ff @(posedge clk) begin
    if (p_en) begin p_q_a <= pmem[p_addr_a]; p_q_b <= pmem[p_addr_b]; end
    if (ma_en) begin m_q <= mmem[ma_addr]; a_q <= amem[ma_addr]; end
    if (r_en) r_q <= rmem[r_addr];
    if (c_ren) begin c_rq_re <= cre[c_raddr]; c_rq_im <= cim[c_raddr]; end
    if (c_we) begin cre[c_waddr] <= c_wd_re; cim[c_waddr] <= c_wd_im; end
    if (h_ren) begin h_rq_re <= hre[h_raddr]; h_rq_im <= him[h_raddr]; end
    if (h_we[0]) hre[h_waddr] <= h_wd_re;
    if (h_we[1]) him[h_waddr] <= h_wd_im;
    if (h_we[2]) habs[h_waddr] <= h_wd_abs;
  end

  // per-angle inputs kept for the reference
  logic signed [15:0] pa [NA][NT*NX];
  logic [23:0]        ma [NA][NTH*NMC];
  logic signed [15:0] aa [NA][NTH*NMC];
  logic signed [15:0] ra [NA][NX];

  real cr [NTH][NX], ci [NTH][NX];     // reference compounded spectrum
  real hr [NZ][NX], hi [NZ][NX];

  // mechanism counters
  int seen_step [16];
  int n_cmp_runs = 0, n_hil_runs = 0, n_hfft = 0, n_of = 0, h_writes_early = 0;
  logic cmp_b_d = 0, hil_b_d = 0, hf_d = 0;
  int  call_no = 0;
  always @(posedge clk) if (rst_n) begin
    seen_step[rec_step]++;
    if (active[1] && !cmp_b_d) n_cmp_runs++;
    if (active[2] && !hil_b_d) n_hil_runs++;
    if (active[3] && !hf_d) n_hfft++;
    cmp_b_d <= active[1]; hil_b_d <= active[2]; hf_d <= active[3];
    if (h_we != 0 && call_no < NA) h_writes_early++;
  end

  task automatic ref_angle(input int n);
    real fr [NTH][NXF], fi [NTH][NXF], gr [NTH][NXF], gi [NTH][NXF];
    real kr [NTH][NXF], ki [NTH][NXF];
    for (int k = 0; k < NTH; k++)
      for (int x = 0; x < NXF; x++) begin
        fr[k][x] = 0; fi[k][x] = 0;
        if (x < NX)
          for (int t = 0; t < NT; t++) begin
            real v; v = pa[n][x*NT + t] / 16384.0;
            fr[k][x] += v * $cos(2*PI*k*t/NT);
            fi[k][x] -= v * $sin(2*PI*k*t/NT);
          end
      end
    for (int k = 0; k < NTH; k++)
      for (int m = 0; m < NXF; m++) begin
        gr[k][m] = 0; gi[k][m] = 0;
        for (int x = 0; x < NXF; x++) begin
          gr[k][m] += fr[k][x]*$cos(2*PI*m*x/NXF) + fi[k][x]*$sin(2*PI*m*x/NXF);
          gi[k][m] += fi[k][x]*$cos(2*PI*m*x/NXF) - fr[k][x]*$sin(2*PI*m*x/NXF);
        end
      end
    for (int m = 0; m < NXF; m++) begin
      int g; g = (m <= NXF/2) ? m : NXF - m;
      for (int j = 0; j < NTH; j++) begin
        int i0; real fq, a, v0r, v0i, v1r, v1i;
        i0 = int'(ma[n][g*NTH + j] >> 12);
        fq = (ma[n][g*NTH + j] & 24'hfff) / 4096.0;
        a  = aa[n][g*NTH + j] / 16384.0;
        v0r = (i0 < NTH) ? gr[i0][m] : 0.0;     v0i = (i0 < NTH) ? gi[i0][m] : 0.0;
        v1r = (i0+1 < NTH) ? gr[i0+1][m] : 0.0; v1i = (i0+1 < NTH) ? gi[i0+1][m] : 0.0;
        kr[j][m] = a * (v0r + (v1r - v0r) * fq);
        ki[j][m] = a * (v0i + (v1i - v0i) * fq);
      end
    end
    for (int j = 0; j < NTH; j++)
      for (int x = 0; x < NX; x++) begin
        real sr, si, ph;
        sr = 0; si = 0;
        for (int m = 0; m < NXF; m++) begin
          sr += kr[j][m]*$cos(2*PI*m*x/NXF) - ki[j][m]*$sin(2*PI*m*x/NXF);
          si += ki[j][m]*$cos(2*PI*m*x/NXF) + kr[j][m]*$sin(2*PI*m*x/NXF);
        end
        ph = j * (ra[n][x] / 4096.0);
        cr[j][x] += sr*$cos(PI*ph) - si*$sin(PI*ph);
        ci[j][x] += sr*$sin(PI*ph) + si*$cos(PI*ph);
      end
  endtask

  initial begin
    int cyc [NA]; real peak, tol;
    foreach (seen_step[i]) seen_step[i] = 0;
    start = 0; last_flag = 0; c_s_in = 0; of_in = 0;
    // angle data; angle 1 repeats angle 0
    for (int n = 0; n < NA; n++) begin
      int src; src = (n == 1) ? 0 : n;
      if (n == 1) begin pa[1] = pa[0]; ma[1] = ma[0]; aa[1] = aa[0]; ra[1] = ra[0]; continue; end
      for (int i = 0; i < NT*NX; i++)
        pa[n][i] = ((i % NT) < 48) ? 16'(int'($urandom_range(0, 16000)) - 8000) : 16'sd0;
      for (int i = 0; i < NTH*NMC; i++) begin
        ma[n][i] = 24'($urandom_range(0, (NTH + 2) * 4096 - 1));
        aa[n][i] = 16'(int'($urandom_range(0, 32768)) - 16384);
      end
      for (int x = 0; x < NX; x++) ra[n][x] = 16'(int'($urandom_range(0, 16383)) - 8192);
      if (src != n) $display("unexpected");
    end
    for (int j = 0; j < NTH; j++) for (int x = 0; x < NX; x++) begin cr[j][x] = 0; ci[j][x] = 0; end
    for (int n = 0; n < NA; n++) ref_angle(n);
    for (int x = 0; x < NX; x++)
      for (int z = 0; z < NZ; z++) begin
        hr[z][x] = 0; hi[z][x] = 0;
        for (int l = 0; l <= NTH; l++) begin
          real vr, vi;
          if (l == 0)        begin vr = cr[0][x] / 2;     vi = ci[0][x] / 2; end
          else if (l == NTH) begin vr = cr[NTH-1][x] / 2; vi = ci[NTH-1][x] / 2; end
          else               begin vr = cr[l][x];         vi = ci[l][x]; end
          hr[z][x] += vr*$cos(2*PI*l*z/NT) - vi*$sin(2*PI*l*z/NT);
          hi[z][x] += vr*$sin(2*PI*l*z/NT) + vi*$cos(2*PI*l*z/NT);
        end
      end
    for (int i = 0; i < NTH*NX; i++) begin cre[i] = 0; cim[i] = 0; end
    for (int i = 0; i < NT*NX; i++) begin hre[i] = 0; him[i] = 0; habs[i] = 0; end

    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < NA; n++) begin
      pmem = pa[n]; mmem = ma[n]; amem = aa[n]; rmem = ra[n];
      call_no = n + 1;
      @(negedge clk); start = 1; last_flag = (n == NA - 1);
      @(negedge clk); start = 0; cyc[n] = 1;
      while (!done) begin @(negedge clk); cyc[n]++; end
      $display("call %0d: %0d cycles, c_s_out=%0d of_out=%0d h_s=%0d", n, cyc[n], c_s_out, of_out, h_s_out);
      if (of_out) n_of++;
      c_s_in = c_s_out; of_in = of_out;
    end
    // H check
    peak = 0;
    for (int x = 0; x < NX; x++) for (int z = 0; z < NZ; z++) begin
      real m; m = $sqrt(hr[z][x]**2 + hi[z][x]**2); if (m > peak) peak = m;
    end
    tol = 0.02 * peak;
    for (int x = 0; x < NX; x++)
      for (int z = 0; z < NZ; z++) begin
        real gr, gi; longint sq, r;
        gr = hre[x*NT + z] / 4194304.0 * (2.0 ** h_s_out);
        gi = him[x*NT + z] / 4194304.0 * (2.0 ** h_s_out);
        checks++;
        if ((gr-hr[z][x]) > tol || (hr[z][x]-gr) > tol || (gi-hi[z][x]) > tol || (hi[z][x]-gi) > tol) begin
          failures++;
          if (failures < 40) $display("FAIL H[%0d][%0d] got (%f,%f) exp (%f,%f)", z, x, gr, gi, hr[z][x], hi[z][x]);
        end
        sq = longint'(hre[x*NT+z])*hre[x*NT+z] + longint'(him[x*NT+z])*him[x*NT+z];
        r = 0;
        for (int b = 24; b >= 0; b--) if ((r | (64'd1 << b)) * (r | (64'd1 << b)) <= sq) r = r | (64'd1 << b);
        checks++;
        if (longint'(habs[x*NT+z]) != r) failures++;
      end
    // mechanisms
    for (int s = 1; s <= 14; s++) begin
      checks++;
      if (seen_step[s] == 0) begin failures++; $display("FAIL reconstruction step %0d never ran", s); end
    end
    $display("mechanisms: compounding %0d, hilbert %0d, hilbert FFT runs %0d, overflow %0d, early H writes %0d",
             n_cmp_runs, n_hil_runs, n_hfft, n_of, h_writes_early);
    checks++; if (n_cmp_runs != NA) begin failures++; $display("FAIL compounding runs"); end
    checks++; if (n_hil_runs != 1)  begin failures++; $display("FAIL hilbert runs"); end
    checks++; if (n_hfft != NX)     begin failures++; $display("FAIL hilbert FFT runs"); end
    checks++; if (n_of == 0)        begin failures++; $display("FAIL overflow never happened"); end
    checks++; if (h_writes_early != 0) begin failures++; $display("FAIL H written before last call"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
