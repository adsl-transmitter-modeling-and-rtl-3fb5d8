// adsl_ifft: 256-point IFFT producing one real DMT symbol from 128 tones.
//
// A real time signal needs a Hermitian-symmetric spectrum, so each tone k
// (1..127) with point Z = X + jY is written twice: Z at bin k and conj(Z) at
// bin 256-k; bins 0 (DC) and 128 (Nyquist) are zero.  The transform is an
// in-place radix-2 decimation-in-time engine: bins are stored at their
// bit-reversed address, then 8 stages of 128 butterflies run, one
// butterfly per clock, and the 256 samples come out in natural order.
// Twiddles are exp(+j*2*pi*m/256) in Q1.14, computed at elaboration.
//
// Fixed point: points enter scaled by 2^8 and every stage halves its result
// (rounding), so the output is sum_k Z(k) e^(+j*2*pi*k*n/256) over all 256
// bins, i.e. 2*Re(...) over the 127 tones, without further scaling; with
// 9-bit points this stays inside SAMPLE_W = 18 bits.  The butterfly data
// path, word widths and scaling are this design's choices; the size 256
// comes from the G.lite configuration.
//
// Interface: tone stream in (in_last on the last tone of a symbol); samples
// out as a valid/ready stream with out_first on sample 0 and out_last on
// sample 255.  Timing per symbol: one clock per tone, 8*128 = 1024 clocks
// of butterflies, then one clock per sample.  A new symbol is taken once
// the previous one has left.  Every tone 1..127 must be written once per
// symbol.
module adsl_ifft (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 in_valid,
  output logic                                 in_ready,
  input  logic [6:0]                           in_tone,
  input  logic signed [adsl_pkg::QAM_W-1:0]    in_x,
  input  logic signed [adsl_pkg::QAM_W-1:0]    in_y,
  input  logic                                 in_last,
  output logic                                 out_valid,
  input  logic                                 out_ready,
  output logic signed [adsl_pkg::SAMPLE_W-1:0] out_data,
  output logic                                 out_first,
  output logic                                 out_last
);
  import adsl_pkg::*;

  localparam int unsigned LOGN = $clog2(N_FFT);   // 8
  localparam int unsigned W    = SAMPLE_W;        // 18
  localparam int unsigned TWB  = 14;              // twiddle fraction bits

  function automatic logic signed [15:0] tw_val(int m, bit sine);
    real a;
    a = 2.0 * 3.14159265358979323846 * real'(m) / real'(N_FFT);
    a = (sine ? $sin(a) : $cos(a)) * real'(1 << TWB);
    return 16'($rtoi(a + ((a >= 0.0) ? 0.5 : -0.5)));
  endfunction

  function automatic logic [16*(N_FFT/2)-1:0] tw_table(bit sine);
    logic [16*(N_FFT/2)-1:0] v;
    for (int m = 0; m < int'(N_FFT / 2); m++) v[16*m +: 16] = tw_val(m, sine);
    return v;
  endfunction

  localparam logic [16*(N_FFT/2)-1:0] TW_COS = tw_table(1'b0);
  localparam logic [16*(N_FFT/2)-1:0] TW_SIN = tw_table(1'b1);

  typedef enum logic [1:0] {S_LOAD, S_CALC, S_OUT} state_t;

  state_t              state;
  logic signed [W-1:0] re [N_FFT];
  logic signed [W-1:0] im [N_FFT];
  logic [LOGN-1:0]     n_out;
  logic [2:0]          stage;
  logic [LOGN-2:0]     bf;

  // butterfly addressing
  logic [LOGN-1:0]     ia, ib, half, pmask;
  logic [LOGN-2:0]     twi;
  logic signed [W-1:0] ar, ai, br, bi;
  logic signed [15:0]  wr, wi;
  logic signed [W+16:0] pr, pi_;
  logic signed [W:0]   tr, ti;
  logic signed [W+1:0] sr0, si0, sr1, si1;
  logic signed [W-1:0] yr0, yi0, yr1, yi1;

  // load addressing
  logic [LOGN-1:0]     la, lb;
  logic signed [W-1:0] lxr, lxi;

  always_comb begin
    half  = LOGN'(1) << stage;
    pmask = half - 1'b1;
    ia    = ((LOGN'(bf) & ~pmask) << 1) | (LOGN'(bf) & pmask);
    ib    = ia | half;
    twi   = (LOGN-1)'((LOGN'(bf) & pmask) << (3'(LOGN - 1) - stage));
    wr    = TW_COS[16*twi +: 16];
    wi    = TW_SIN[16*twi +: 16];
    // bins 0 and 128 sit at addresses 0 and 1 and are always zero
    if (stage == 3'd0 && bf == '0) begin
      ar = '0; ai = '0; br = '0; bi = '0;
    end else begin
      ar = re[ia]; ai = im[ia]; br = re[ib]; bi = im[ib];
    end
    pr  = (W+17)'(wr * br) - (W+17)'(wi * bi);
    pi_ = (W+17)'(wr * bi) + (W+17)'(wi * br);
    tr  = (W+1)'(pr >>> TWB);
    ti  = (W+1)'(pi_ >>> TWB);
    sr0 = (W+2)'(ar) + (W+2)'(tr) + 1;
    si0 = (W+2)'(ai) + (W+2)'(ti) + 1;
    sr1 = (W+2)'(ar) - (W+2)'(tr) + 1;
    si1 = (W+2)'(ai) - (W+2)'(ti) + 1;
    yr0 = W'(sr0 >>> 1);
    yi0 = W'(si0 >>> 1);
    yr1 = W'(sr1 >>> 1);
    yi1 = W'(si1 >>> 1);
  end

  always_comb begin
    la  = bitrev8(8'(in_tone), LOGN);
    lb  = bitrev8(8'(N_FFT) - 8'(in_tone), LOGN);
    lxr = W'(in_x) <<< 8;
    lxi = W'(in_y) <<< 8;
  end

  assign in_ready  = (state == S_LOAD);
  assign out_valid = (state == S_OUT);
  assign out_data  = re[n_out];
  assign out_first = (n_out == '0);
  assign out_last  = (n_out == LOGN'(N_FFT - 1));

  always_ff @(posedge clk) begin
    if (state == S_LOAD && in_valid) begin
      re[la] <= lxr;
      im[la] <= lxi;
      re[lb] <= lxr;
      im[lb] <= -lxi;
    end else if (state == S_CALC) begin
      re[ia] <= yr0;
      im[ia] <= yi0;
      re[ib] <= yr1;
      im[ib] <= yi1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD;
      stage <= '0;
      bf    <= '0;
      n_out <= '0;
    end else begin
      unique case (state)
        S_LOAD: if (in_valid && in_last) begin
          state <= S_CALC;
          stage <= '0;
          bf    <= '0;
        end
        S_CALC: begin
          bf <= bf + 1'b1;
          if (bf == '1) begin
            stage <= stage + 1'b1;
            if (stage == 3'(LOGN - 1)) begin
              state <= S_OUT;
              n_out <= '0;
            end
          end
        end
        S_OUT: if (out_ready) begin
          n_out <= n_out + 1'b1;
          if (out_last) state <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

endmodule
