// rc5_decrypt: iterative RC5-w/r decryption datapath.
//
// The inverse of rc5_encrypt. For i = r down to 1:
//   B = ((B - S[2i+1]) >>> A) xor A
//   A = ((A - S[2i])   >>> B) xor B
// and finally B -= S[1], A -= S[0]. Rotations use the low lg(w) bits of the
// amount. This follows the RC5 decryption data flow.
//
// Timing (this design's choice): the block is loaded in the cycle `start` is
// sampled, then one full round per clock; the final un-whitening is folded
// into the last round. `done` pulses with `dout` valid R+1 cycles after the
// start cycle; `dout` holds until the next start. `start` is ignored while
// `busy`.
//
// Interface: din/dout = {B, A}, A in the low word. `s_tab` must stay stable
// while busy.
module rc5_decrypt #(
  parameter int unsigned W = 32,  // word size in bits
  parameter int unsigned R = 12   // number of rounds
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [2*W-1:0] din,
  input  logic [W-1:0]   s_tab [2*R+2],
  output logic           busy,
  output logic           done,
  output logic [2*W-1:0] dout
);

  localparam int unsigned LW = $clog2(W);
  localparam int unsigned RW = $clog2(R + 1);

  function automatic logic [W-1:0] rotr(input logic [W-1:0] x, input logic [LW-1:0] n);
    return (x >> n) | (x << (W - int'(n)));
  endfunction

  logic [W-1:0]  a_q, b_q;
  logic [RW-1:0] rnd_q;   // round being undone, R..1

  logic [W-1:0] a_new, b_new;
  always_comb begin
    b_new = rotr(b_q - s_tab[2*rnd_q + 1], a_q[LW-1:0]) ^ a_q;
    a_new = rotr(a_q - s_tab[2*rnd_q], b_new[LW-1:0]) ^ b_new;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_q   <= '0;
      b_q   <= '0;
      rnd_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          a_q   <= din[W-1:0];
          b_q   <= din[2*W-1:W];
          rnd_q <= RW'(R);
          busy  <= 1'b1;
        end
      end else begin
        rnd_q <= rnd_q - 1'b1;
        if (rnd_q == RW'(1)) begin
          a_q  <= a_new - s_tab[0];
          b_q  <= b_new - s_tab[1];
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          a_q <= a_new;
          b_q <= b_new;
        end
      end
    end
  end

  assign dout = {b_q, a_q};

endmodule
