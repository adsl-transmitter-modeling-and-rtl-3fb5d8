// adsl_crc8: 8-bit superframe CRC, G(D) = D^8 + D^4 + D^3 + D^2 + 1.
//
// The remainder crc(D) = M(D) * D^8 mod G(D) is built by the classic
// bit-serial division register.  To keep pace with a byte stream the eight
// bit steps of one byte are unrolled, so one byte is absorbed per clock
// while the circuit stays the bit-level LFSR of the polynomial.  Bits of a
// byte enter most significant bit first (the MSB is the earlier message
// bit, an assumption of this design).  The result byte holds c0 in bit 7
// and c7 in bit 0, so sending it MSB first sends c0 first.
//
// Interface: `clear` restarts the remainder at zero (it wins over `en` and
// the byte of that cycle is not absorbed); `en` absorbs `data`.  `crc` is
// the remainder over every byte absorbed since the last clear and is valid
// the cycle after the last `en`.
module adsl_crc8 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       en,
  input  logic [7:0] data,
  output logic [7:0] crc
);
  // G(D) without the D^8 term: D^4 + D^3 + D^2 + 1
  localparam logic [7:0] POLY = 8'h1D;

  logic [7:0] next;

  always_comb begin
    next = crc;
    for (int i = 7; i >= 0; i--) begin
      if (next[7] ^ data[i]) next = {next[6:0], 1'b0} ^ POLY;
      else                   next = {next[6:0], 1'b0};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     crc <= '0;
    else if (clear) crc <= '0;
    else if (en)    crc <= next;
  end

endmodule
