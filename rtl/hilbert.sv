// hilbert: analytic-signal image H from the compounded half-spectrum C.
//
// For each x column the positive-k_z half-spectrum C[0..NT_FFT/2-1] is
// expanded into an "analytic" spectrum of NT_FFT points: bin 0 and bin
// NT_FFT/2 get C[0]/2 and C[NT_FFT/2-1]/2, bins 1..NT_FFT/2-1 get C unchanged,
// the negative-frequency bins get zero (the document's expansion, with the
// whole spectrum halved). The spectrum is conjugated, passed through the
// 24-bit NT_FFT-point FFT and conjugated again, giving an inverse FFT without
// the 1/N factor; rows 0..NZ-1 are written to the Re(H) and Im(H) planes of
// the external H memory, and the FFT's scaling factor S(x) is kept. Once all
// columns are done a second pass reads every column back, equalises it to
// max S(x), computes |H| with the pipelined square root and writes all three
// planes. h_s = max S(x) + c_s_in + of_in is the scaling factor of the result
// (of_in set means the stored C is halved first, see compounding).
//
// H memory: word x*NT_FFT + z in each of three planes selected by
// h_we = {abs, im, re}; one read port (Re and Im planes, one cycle latency).
// C memory: read port, word x*(NT_FFT/2) + k_z.
//
// Timing per call: NX * (NT_FFT + 1 + FFT time + NZ + 2) cycles for the
// transform passes, then NX * (NZ + W + 3) for the equalisation pass.
module hilbert
  import stolt_pkg::*;
#(
  parameter int unsigned NT_FFT = 4096,
  parameter int unsigned NX     = 128,
  parameter int unsigned NZ     = 2048
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic busy,
  output logic done,
  input  scale_t c_s_in,
  input  logic   of_in,
  output scale_t h_s,
  output logic   fft_busy,       // the 24-bit FFT is running (for observation)
  // C memory read port
  output logic                            c_ren,
  output logic [$clog2(NT_FFT/2*NX)-1:0]  c_raddr,
  input  logic signed [23:0]              c_rq_re,
  input  logic signed [23:0]              c_rq_im,
  // H memory
  output logic [2:0]                      h_we,
  output logic [$clog2(NT_FFT*NX)-1:0]    h_waddr,
  output logic signed [23:0]              h_wd_re,
  output logic signed [23:0]              h_wd_im,
  output logic [23:0]                     h_wd_abs,
  output logic                            h_ren,
  output logic [$clog2(NT_FFT*NX)-1:0]    h_raddr,
  input  logic signed [23:0]              h_rq_re,
  input  logic signed [23:0]              h_rq_im
);
  localparam int unsigned NTH  = NT_FFT / 2;
  localparam int unsigned LT   = $clog2(NT_FFT);
  localparam int unsigned LNX  = $clog2(NX);
  localparam int unsigned MLAT = 24 + 1;          // magnitude latency
  localparam int unsigned CW   = LT + 2;
  localparam int unsigned HAW  = $clog2(NT_FFT*NX);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_RUN, S_STORE, S_EQ, S_FIN} state_t;
  state_t state;
  assign busy = (state != S_IDLE);

  logic [CW-1:0]  cnt, len, depth;
  logic [LNX-1:0] x;
  logic           iss;
  logic           vld [MLAT+1];
  logic [CW-1:0]  idx [MLAT+1];
  logic           hv  [MLAT+1];    // half flag (bins 0 and NTH) / zero flag
  logic           zf1;
  scale_t         sx [NX];
  scale_t         max_s;

  always_comb begin
    unique case (state)
      S_LOAD:  begin len = CW'(NT_FFT); depth = CW'(1); end
      S_STORE: begin len = CW'(NZ);     depth = CW'(1); end
      S_EQ:    begin len = CW'(NZ);     depth = CW'(MLAT + 1); end
      default: begin len = '0;          depth = '0; end
    endcase
    iss = (cnt < len);
  end
  wire last = (cnt == len + depth - 1'b1);

  // FFT engine
  logic                 f_we, f_start, f_done;
  logic [LT-1:0]        f_waddr, f_ra;
  logic signed [23:0]   f_wre, f_wim, f_qra, f_qia, f_qrb_u, f_qib_u;
  scale_t               f_smax;
  fft_bfp #(.N(NT_FFT), .W(24), .FRAC(22)) u_fft (
    .clk, .rst_n, .in_we(f_we), .in_addr(f_waddr), .in_re(f_wre), .in_im(f_wim),
    .start(f_start), .busy(fft_busy), .done(f_done), .smax(f_smax),
    .rd_addr_a(f_ra), .rd_re_a(f_qra), .rd_im_a(f_qia),
    .rd_addr_b('0), .rd_re_b(f_qrb_u), .rd_im_b(f_qib_u));

  // magnitude unit
  logic               mg_in_valid, mg_valid_u;
  logic signed [23:0] eq_re, eq_im;
  logic [23:0]        mg;
  magnitude #(.W(24)) u_mag (
    .clk, .rst_n, .in_valid(mg_in_valid), .re(eq_re), .im(eq_im),
    .out_valid(mg_valid_u), .mag(mg));

  logic signed [23:0] dre [MLAT+1];
  logic signed [23:0] dim [MLAT+1];

  // addressing for the element issued this cycle
  always_comb begin
    logic [LT-1:0] l, r;
    l = LT'(cnt);
    if (cnt == '0)                r = '0;
    else if (32'(cnt) < NTH)      r = l;
    else                          r = LT'(NTH - 1);
    c_ren   = (state == S_LOAD) && iss;
    c_raddr = ($clog2(NTH*NX))'(32'(x) * NTH + 32'(r));
    f_ra    = LT'(cnt);
    h_ren   = (state == S_EQ) && iss;
    h_raddr = HAW'(32'(x) * NT_FFT + 32'(cnt));
  end

  // delay-1 datapath
  always_comb begin
    int unsigned sh;
    logic signed [23:0] vr, vi;
    sh    = 32'(of_in) + (hv[0] ? 1 : 0);
    vr    = 24'(sra_round(48'(c_rq_re), sh));
    vi    = 24'(sra_round(48'(c_rq_im), sh));
    f_we    = (state == S_LOAD) && vld[0];
    f_waddr = LT'(idx[0]);
    f_wre   = zf1 ? 24'sd0 : vr;
    f_wim   = zf1 ? 24'sd0 : -vi;
    eq_re   = 24'(sra_round(48'(h_rq_re), max_s - sx[x]));
    eq_im   = 24'(sra_round(48'(h_rq_im), max_s - sx[x]));
    mg_in_valid = (state == S_EQ) && vld[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int i = 0; i <= int'(MLAT); i++) vld[i] <= 1'b0;
    else begin
      vld[0] <= iss && (state inside {S_LOAD, S_STORE, S_EQ});
      for (int i = 1; i <= int'(MLAT); i++) vld[i] <= vld[i-1];
      // a pass ends once its last element has left its pipeline; entries
      // further down must not leak into the deeper equalisation pass
      if (last) for (int i = 0; i <= int'(MLAT); i++) vld[i] <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    idx[0] <= cnt;
    hv[0]  <= (cnt == '0) || (32'(cnt) == NTH);
    zf1    <= (32'(cnt) > NTH);
    for (int i = 1; i <= int'(MLAT); i++) begin
      idx[i] <= idx[i-1]; hv[i] <= hv[i-1];
    end
    dre[1] <= eq_re; dim[1] <= eq_im;
    dre[0] <= '0;    dim[0] <= '0;
    for (int i = 2; i <= int'(MLAT); i++) begin
      dre[i] <= dre[i-1]; dim[i] <= dim[i-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; cnt <= '0; x <= '0; done <= 1'b0; f_start <= 1'b0;
      h_we <= '0; max_s <= '0; h_s <= '0;
    end else begin
      done    <= 1'b0;
      f_start <= 1'b0;
      h_we    <= '0;
      if (state inside {S_LOAD, S_STORE, S_EQ}) cnt <= last ? '0 : cnt + 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_LOAD; cnt <= '0; x <= '0; max_s <= '0;
        end
        S_LOAD: if (last) begin
          state   <= S_RUN;
          f_start <= 1'b1;
        end
        S_RUN: if (f_done) state <= S_STORE;
        S_STORE: begin
          if (vld[0]) begin
            h_we    <= 3'b011;
            h_waddr <= HAW'(32'(x) * NT_FFT + 32'(idx[0]));
            h_wd_re <= f_qra;
            h_wd_im <= -f_qia;
          end
          if (last) begin
            sx[x] <= f_smax;
            max_s <= max_scale(max_s, f_smax);
            if (32'(x) == NX - 1) begin state <= S_EQ; x <= '0; end
            else begin state <= S_LOAD; x <= x + 1'b1; end
          end
        end
        S_EQ: begin
          if (vld[MLAT]) begin
            h_we     <= 3'b111;
            h_waddr  <= HAW'(32'(x) * NT_FFT + 32'(idx[MLAT]));
            h_wd_re  <= dre[MLAT];
            h_wd_im  <= dim[MLAT];
            h_wd_abs <= mg;
          end
          if (last) begin
            if (32'(x) == NX - 1) state <= S_FIN;
            else x <= x + 1'b1;
          end
        end
        S_FIN: begin
          h_s   <= max_s + c_s_in + scale_t'(of_in);
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) start |-> state == S_IDLE);
endmodule
