// adsl_scrambler: self-synchronising data scrambler d_n = D_n ^ d_(n-18) ^ d_(n-23).
//
// The register holds the last 23 output bits.  A byte is scrambled per
// clock by unrolling the eight bit steps; the most significant bit of a
// byte is the earlier bit of the serial stream (this design's choice, the
// same as in the CRC).  The register starts at zero after reset.
//
// Interface: valid/ready byte stream, combinational from input to output
// (zero latency); the state advances on every accepted byte.
module adsl_scrambler (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_data,
  output logic       out_valid,
  input  logic       out_ready,
  output logic [7:0] out_data
);
  logic [22:0] hist;        // hist[k] = d_(n-1-k)
  logic [22:0] hist_next;

  always_comb begin
    hist_next = hist;
    for (int i = 7; i >= 0; i--) begin
      out_data[i] = in_data[i] ^ hist_next[17] ^ hist_next[22];
      hist_next   = {hist_next[21:0], out_data[i]};
    end
  end

  assign out_valid = in_valid;
  assign in_ready  = out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      hist <= '0;
    else if (in_valid && out_ready)  hist <= hist_next;
  end

endmodule
