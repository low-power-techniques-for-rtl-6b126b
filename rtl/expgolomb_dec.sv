// expgolomb_dec: Exp-Golomb decoder of the entropy decoder, used for the
// non-coefficient syntax elements (motion vector differences, modes, QP
// deltas and the like). A codeword is M leading zeros, a one, and M info
// bits; it stands for symbol 2^M - 1 + info. The whole codeword is found
// in one cycle from a 32-bit window of the bitstream (MSB = next bit) by a
// leading-zero count, so no bit-serial search is needed. Both mappings are
// given: unsigned ue(v) and signed se(v) (k -> (-1)^(k+1) * ceil(k/2)).
// Codewords longer than 31 bits are flagged as errors.
// Output registered: one codeword per cycle, one cycle latency. The
// caller advances its bitstream pointer by out_len.
module expgolomb_dec (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [31:0]        bits,      // bits[31] is the next bit
  output logic               out_valid,
  output logic               out_err,
  output logic [5:0]         out_len,   // codeword length in bits
  output logic [31:0]        out_ue,
  output logic signed [31:0] out_se
);
  logic [4:0]  lz;
  logic        found;
  logic [31:0] info, ue;
  logic signed [31:0] se;

  always_comb begin
    lz    = '0;
    found = 1'b0;
    for (int i = 31; i >= 16; i--) begin
      if (!found && bits[i]) begin
        found = 1'b1;
        lz    = 5'(31 - i);
      end
    end
    // info bits: the lz bits after the leading one
    info = (bits << (lz + 5'd1)) >> (6'd32 - {1'b0, lz});
    if (lz == 5'd0) info = '0;
    ue = (32'd1 << lz) - 32'd1 + info;
    se = ue[0] ? signed'((ue + 32'd1) >> 1) : -signed'(ue >> 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_err   <= 1'b0;
      out_len   <= '0;
      out_ue    <= '0;
      out_se    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_err <= !found;
        out_len <= {lz, 1'b1};
        out_ue  <= ue;
        out_se  <= se;
      end
    end
  end
endmodule
