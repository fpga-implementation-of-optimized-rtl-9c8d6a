// rc5_encrypt: iterative RC5-w/r encryption datapath.
//
// The block is two w-bit words A and B. The input is whitened with the first
// two round keys (A += S[0], B += S[1]); each of the r rounds then computes
//   A = ((A xor B) <<< B) + S[2i]
//   B = ((B xor A) <<< A) + S[2i+1]
// where a rotation uses the low lg(w) bits of its amount. This is the
// algorithm and round structure of the RC5 encryption data flow.
//
// Timing (this design's choice): one full round (both half-rounds, chained
// combinationally as drawn in the round diagram) per clock. The whitening is
// done as the block is loaded, in the cycle `start` is sampled. `done` pulses
// with `dout` valid R+1 cycles after that cycle (load plus R rounds); `dout` holds until the
// next start. `start` is ignored while `busy`.
//
// Interface: din/dout = {B, A}, A in the low word. The round-key table is read
// from the `s_tab` array, which must stay stable while busy.
module rc5_encrypt #(
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

  function automatic logic [W-1:0] rotl(input logic [W-1:0] x, input logic [LW-1:0] n);
    return (x << n) | (x >> (W - int'(n)));
  endfunction

  logic [W-1:0]  a_q, b_q;
  logic [RW-1:0] rnd_q;   // round being computed, 1..R

  logic [W-1:0] a_new, b_new;
  always_comb begin
    a_new = rotl(a_q ^ b_q, b_q[LW-1:0]) + s_tab[2*rnd_q];
    b_new = rotl(b_q ^ a_new, a_new[LW-1:0]) + s_tab[2*rnd_q + 1];
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
          a_q   <= din[W-1:0]   + s_tab[0];
          b_q   <= din[2*W-1:W] + s_tab[1];
          rnd_q <= RW'(1);
          busy  <= 1'b1;
        end
      end else begin
        a_q   <= a_new;
        b_q   <= b_new;
        rnd_q <= rnd_q + 1'b1;
        if (rnd_q == RW'(R)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign dout = {b_q, a_q};

endmodule
