// adsl_interleaver: convolutional byte interleaver.
//
// Byte I of each Reed-Solomon codeword (I = 0 .. N-1) leaves (D-1)*I byte
// periods after it arrives, D being the interleave depth (1, 2, 4, 8 or
// 16).  The delay line is one circular buffer of DEPTH bytes indexed by a
// free-running step counter t: at step t the byte with index I is written
// to address t + (D-1)*I and the byte stored at address t is read out.
// Because D is a power of two, two bytes can only meet in the same slot when
// N is even.  As in the ADSL standard (not in the text this design follows),
// an even-length codeword is therefore extended by a dummy byte in front
// (index 0, zero delay), which enters and leaves in the same step and is
// dropped, so the stream carries no dummy bytes.  Slots that no byte has
// reached yet read as zero: after reset the buffer is cleared, one address
// per clock, before the first byte is accepted (in_ready low meanwhile).
//
// Interface: valid/ready byte streams with a one-byte output register.
// Every accepted byte produces exactly one output byte, delayed as above.
// Constraint: (D-1)*(N'-1) < DEPTH, with N' = N or N+1 (odd); cfg_* may
// change only when the stream is empty.
module adsl_interleaver #(
  parameter int unsigned DEPTH = 8192,   // buffer bytes, power of two
  parameter int unsigned LEN_W = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [4:0]       cfg_d,        // interleave depth D
  input  logic [LEN_W-1:0] cfg_n,        // codeword length N = K*S + R
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [7:0]       in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [7:0]       out_data,
  output logic             dummy_step    // pulses when a dummy byte is taken
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [7:0]       mem [DEPTH];
  logic [AW-1:0]    t;                   // step counter = read address
  logic [LEN_W:0]   idx;                 // internal index I within N'
  logic             init_busy;
  logic [AW-1:0]    init_addr;
  logic             n_even;
  logic [LEN_W:0]   n_int;               // N' (odd)
  logic             is_dummy;
  logic             step;
  logic             can_out;
  logic [AW-1:0]    d_minus_1;
  logic [AW-1:0]    delay;
  logic [AW-1:0]    waddr;
  logic [7:0]       rd_byte;

  assign n_even   = ~cfg_n[0] && (cfg_d != 5'd1);
  assign n_int    = n_even ? ({1'b0, cfg_n} + 1'b1) : {1'b0, cfg_n};
  assign is_dummy = n_even && (idx == '0);
  assign can_out  = !out_valid || out_ready;
  assign step     = !init_busy && can_out && (is_dummy || in_valid);
  assign in_ready = !init_busy && can_out && !is_dummy;

  assign d_minus_1  = AW'(cfg_d - 5'd1);
  assign delay      = d_minus_1 * AW'(idx);   // (D-1)*I, below DEPTH by constraint
  assign waddr      = t + delay;
  assign rd_byte    = (delay == '0) ? in_data : mem[t];
  assign dummy_step = step && is_dummy;

  always_ff @(posedge clk) begin
    if (init_busy)                         mem[init_addr] <= '0;
    else if (step && !is_dummy && delay != '0) mem[waddr] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_busy <= 1'b1;
      init_addr <= '0;
      t         <= '0;
      idx       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (init_busy) begin
        init_addr <= init_addr + 1'b1;
        if (init_addr == AW'(DEPTH - 1)) init_busy <= 1'b0;
      end
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (step) begin
        t   <= t + 1'b1;
        idx <= (idx == n_int - 1'b1) ? '0 : idx + 1'b1;
        if (!is_dummy) begin
          out_valid <= 1'b1;
          out_data  <= rd_byte;
        end
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
