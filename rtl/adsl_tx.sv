// adsl_tx: downstream ADSL (G.lite) DMT transmitter.
//
// User bytes travel through the chain
//   framer + CRC -> scrambler -> Reed-Solomon encoder -> interleaver ->
//   tone ordering / constellation encoder -> 256-point IFFT -> cyclic prefix
// and leave as 272 real samples per DMT symbol.  Every superframe is 68
// data symbols followed by one sync symbol; the CRC of a superframe's user
// bytes rides in the first byte of the next superframe.  R parity bytes are
// added per S data frames of K bytes and the codewords are interleaved to
// depth D.  The reference setting is 127 tones of 8 bits, K = 126, S = 4,
// R = 4, D = 2: each symbol then carries 127 bytes (126 user bytes plus one
// parity byte), since an RS codeword of 4*126 + 4 = 508 bytes spans four
// symbols.
//
// The whole path is a chain of valid/ready streams, so the output pace is
// set by the sample consumer and the IFFT: in steady state a symbol takes
// 1407 clocks (127 tones loaded, 1024 butterflies, 256 samples out), the
// prefix stage sending the previous symbol meanwhile.  After reset the
// interleaver clears its buffer for IL_DEPTH clocks before taking bytes.
// Configuration (cfg_*) must be stable while data flows; the bit allocation
// and tone order tables are written through tbl_* and ord_* (or the order
// is derived from the bit table with ord_build) before tx_en is raised (no
// symbol is sent while it is low), and the sum of the allocated bits must
// equal 8 * (K + R/S) for symbols to line up with frames (not checked). An
// assertion checks the configuration rules (R in {0,4,8,16}, S and D in
// {1,2,4,8,16}, R/S an integer) while user data is offered. The ev_*
// outputs pulse on the framer's CRC byte, on RS parity bytes, on
// interleaver dummy steps and on sync-symbol tones, for monitoring.
module adsl_tx #(
  parameter int unsigned SF_FRAMES = adsl_pkg::SF_DATA_FRAMES,
  parameter int unsigned IL_DEPTH  = 8192
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  // configuration
  input  logic                                 tx_en,     // tables loaded, start sending
  input  logic [7:0]                           cfg_k,     // bytes per data frame
  input  logic [4:0]                           cfg_s,     // frames per RS codeword
  input  logic [4:0]                           cfg_r,     // parity bytes per codeword
  input  logic [4:0]                           cfg_d,     // interleave depth
  input  logic [3:0]                           cfg_bmax,  // largest bits per tone
  input  logic                                 tbl_we,
  input  logic [6:0]                           tbl_tone,
  input  logic [3:0]                           tbl_bits,
  output logic                                 tbl_err,
  input  logic                                 ord_we,
  input  logic [6:0]                           ord_pos,
  input  logic [6:0]                           ord_tone,
  input  logic                                 ord_build, // order tones by bit count
  output logic                                 ord_busy,
  // user data
  input  logic                                 in_valid,
  output logic                                 in_ready,
  input  logic [7:0]                           in_data,
  // line samples
  output logic                                 out_valid,
  input  logic                                 out_ready,
  output logic signed [adsl_pkg::SAMPLE_W-1:0] out_sample,
  output logic                                 out_sym_first,
  output logic                                 out_prefix,
  output logic                                 out_sym_last,
  // monitoring
  output logic                                 ev_crc,
  output logic                                 ev_parity,
  output logic                                 ev_dummy,
  output logic                                 ev_sync
);
  import adsl_pkg::*;

  localparam int unsigned LEN_W = 12;

  logic [LEN_W-1:0] msg_len, cw_len;
  assign msg_len = LEN_W'(cfg_k) * LEN_W'(cfg_s);
  assign cw_len  = msg_len + LEN_W'(cfg_r);

  // framer -> scrambler
  logic       f_valid, f_ready, f_crc, f_frame_start;
  logic [7:0] f_data;
  // scrambler -> RS
  logic       s_valid, s_ready;
  logic [7:0] s_data;
  // RS -> interleaver
  logic       r_valid, r_ready, r_parity, r_cw_last;
  logic [7:0] r_data;
  // interleaver -> constellation encoder
  logic       i_valid, i_ready, i_dummy;
  logic [7:0] i_data;
  // constellation encoder -> IFFT
  logic                    c_valid, c_ready, c_last, c_sync;
  logic [6:0]              c_tone;
  logic signed [QAM_W-1:0] c_x, c_y;
  // IFFT -> cyclic prefix
  logic                       t_valid, t_ready, t_first, t_last;
  logic signed [SAMPLE_W-1:0] t_data;

  adsl_framer #(.SF_FRAMES(SF_FRAMES)) u_framer (
    .clk, .rst_n, .cfg_k,
    .in_valid, .in_ready, .in_data,
    .out_valid(f_valid), .out_ready(f_ready), .out_data(f_data),
    .out_crc(f_crc), .out_frame_start(f_frame_start)
  );

  adsl_scrambler u_scrambler (
    .clk, .rst_n,
    .in_valid(f_valid), .in_ready(f_ready), .in_data(f_data),
    .out_valid(s_valid), .out_ready(s_ready), .out_data(s_data)
  );

  adsl_rs_encoder #(.LEN_W(LEN_W)) u_rs (
    .clk, .rst_n, .cfg_r, .cfg_msg_len(msg_len),
    .in_valid(s_valid), .in_ready(s_ready), .in_data(s_data),
    .out_valid(r_valid), .out_ready(r_ready), .out_data(r_data),
    .out_parity(r_parity), .out_cw_last(r_cw_last)
  );

  adsl_interleaver #(.DEPTH(IL_DEPTH), .LEN_W(LEN_W)) u_il (
    .clk, .rst_n, .cfg_d, .cfg_n(cw_len),
    .in_valid(r_valid), .in_ready(r_ready), .in_data(r_data),
    .out_valid(i_valid), .out_ready(i_ready), .out_data(i_data),
    .dummy_step(i_dummy)
  );

  adsl_const_encoder #(.N_TONES(N_TONES), .SF_FRAMES(SF_FRAMES)) u_qam (
    .clk, .rst_n, .tx_en, .cfg_bmax,
    .tbl_we, .tbl_tone, .tbl_bits, .tbl_err,
    .ord_we, .ord_pos, .ord_tone, .ord_build, .ord_busy,
    .in_valid(i_valid), .in_ready(i_ready), .in_data(i_data),
    .out_valid(c_valid), .out_ready(c_ready), .out_tone(c_tone),
    .out_x(c_x), .out_y(c_y), .out_last(c_last), .out_sync(c_sync)
  );

  adsl_ifft u_ifft (
    .clk, .rst_n,
    .in_valid(c_valid), .in_ready(c_ready), .in_tone(c_tone),
    .in_x(c_x), .in_y(c_y), .in_last(c_last),
    .out_valid(t_valid), .out_ready(t_ready), .out_data(t_data),
    .out_first(t_first), .out_last(t_last)
  );

  adsl_cyclic_prefix u_cp (
    .clk, .rst_n,
    .in_valid(t_valid), .in_ready(t_ready), .in_data(t_data),
    .out_valid, .out_ready, .out_data(out_sample),
    .out_first(out_sym_first), .out_prefix, .out_last(out_sym_last)
  );

  // Configuration rules: R in {0,4,8,16}, S and D in {1,2,4,8,16}, R/S an
  // integer; checked whenever user data is offered.
  function automatic logic pow2_upto16(logic [4:0] v);
    return (v == 5'd1) || (v == 5'd2) || (v == 5'd4) || (v == 5'd8) || (v == 5'd16);
  endfunction

  logic cfg_legal;
  assign cfg_legal = pow2_upto16(cfg_s) && pow2_upto16(cfg_d) &&
                     (cfg_r == 5'd0 || cfg_r == 5'd4 || cfg_r == 5'd8 || cfg_r == 5'd16) &&
                     ((cfg_r & (cfg_s - 5'd1)) == 5'd0);   // S a power of two

  a_cfg_legal: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> cfg_legal);

  assign ev_crc    = f_valid && f_ready && f_crc;
  assign ev_parity = r_valid && r_ready && r_parity;
  assign ev_dummy  = i_dummy;
  assign ev_sync   = c_valid && c_ready && c_sync;

endmodule
