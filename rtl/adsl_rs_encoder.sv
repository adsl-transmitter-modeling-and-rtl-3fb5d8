// adsl_rs_encoder: systematic Reed-Solomon encoder over GF(256).
//
// Every codeword is cfg_msg_len message bytes (K bytes per data frame times
// S frames) followed by cfg_r redundancy bytes c0..c(R-1), the coefficients
// of C(D) = M(D) * D^R mod G(D), c0 being the coefficient of D^(R-1).  R is
// programmable among 0, 4, 8 and 16.  The field polynomial
// x^8+x^4+x^3+x^2+1 and G(D) = prod_{i=0}^{R-1} (D + alpha^i) are the usual
// ADSL choices, assumed here; the three generators are computed at
// elaboration.
//
// Structure: an R_MAX-stage GF(256) division register.  Message bytes pass
// straight through (combinationally) while the register absorbs them; after
// the last one the input is held and the register is shifted out, one
// parity byte per clock, c0 first.  With R = 0 the bytes only pass through.
//
// Interface: valid/ready byte streams.  out_parity marks parity bytes,
// out_cw_last the last byte of a codeword.  cfg_* may change only between
// codewords.
module adsl_rs_encoder #(
  parameter int unsigned LEN_W = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [4:0]       cfg_r,        // 0, 4, 8 or 16
  input  logic [LEN_W-1:0] cfg_msg_len,  // K*S, at least 1
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [7:0]       in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [7:0]       out_data,
  output logic             out_parity,
  output logic             out_cw_last
);
  import adsl_pkg::*;

  localparam logic [8*(R_MAX+1)-1:0] GEN4  = rs_gen_vec(4);
  localparam logic [8*(R_MAX+1)-1:0] GEN8  = rs_gen_vec(8);
  localparam logic [8*(R_MAX+1)-1:0] GEN16 = rs_gen_vec(16);

  logic [LEN_W-1:0] cnt;          // message byte index or parity index
  logic             in_parity;    // shifting parity out
  byte_t            par  [R_MAX];
  byte_t            par_next [R_MAX];
  logic [8*(R_MAX+1)-1:0] gen;
  byte_t            fb;
  logic             xfer;
  logic             last_msg;

  always_comb begin
    unique case (cfg_r)
      5'd4:    gen = GEN4;
      5'd8:    gen = GEN8;
      5'd16:   gen = GEN16;
      default: gen = '0;
    endcase
  end

  // feedback = message byte + highest-degree remainder coefficient
  always_comb begin
    fb = in_data;
    for (int j = 0; j < R_MAX; j++)
      if (5'(j) == cfg_r - 5'd1) fb = in_data ^ par[j];
    for (int j = 0; j < R_MAX; j++) begin
      par_next[j] = ((j == 0) ? 8'd0 : par[j == 0 ? 0 : j-1]) ^ gf_mul(fb, gen[8*j +: 8]);
      if (5'(j) >= cfg_r) par_next[j] = '0;
    end
  end

  assign in_ready  = !in_parity && out_ready;
  assign out_valid = in_parity ? 1'b1 : in_valid;
  always_comb begin
    out_data = in_data;
    if (in_parity)
      for (int j = 0; j < R_MAX; j++)
        if (5'(j) == cfg_r - 5'd1) out_data = par[j];
  end
  assign out_parity  = in_parity;
  assign last_msg    = (cnt == cfg_msg_len - 1'b1);
  assign out_cw_last = in_parity ? (cnt == LEN_W'(cfg_r) - 1'b1)
                                 : (last_msg && cfg_r == '0);
  assign xfer        = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      in_parity <= 1'b0;
      for (int j = 0; j < R_MAX; j++) par[j] <= '0;
    end else if (xfer) begin
      if (!in_parity) begin
        for (int j = 0; j < R_MAX; j++) par[j] <= par_next[j];
        if (last_msg) begin
          cnt       <= '0;
          in_parity <= (cfg_r != '0);
        end else begin
          cnt <= cnt + 1'b1;
        end
      end else begin
        // shift towards the output end: par[R-1] leaves, zero enters par[0]
        for (int j = R_MAX - 1; j > 0; j--) par[j] <= par[j-1];
        par[0] <= '0;
        if (cnt == LEN_W'(cfg_r) - 1'b1) begin
          // codeword done: the next one starts from an empty register
          for (int j = 0; j < R_MAX; j++) par[j] <= '0;
          cnt       <= '0;
          in_parity <= 1'b0;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  // Parity bytes are offered unconditionally; the input is never taken then.
  a_no_input_in_parity: assert property (@(posedge clk) disable iff (!rst_n)
    in_parity |-> !in_ready);

endmodule
