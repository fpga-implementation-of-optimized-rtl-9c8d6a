// rc6_encrypt: iterative RC6-w/r encryption datapath.
//
// The block is four w-bit words A, B, C, D. After B += S[0], D += S[1], each
// of the r rounds computes
//   t = f(B),  u = f(D)            with f(x) = (x(2x+1)) <<< lg w  (rc6_f)
//   A = ((A xor t) <<< u) + S[2i]
//   C = ((C xor u) <<< t) + S[2i+1]
//   (A, B, C, D) = (B, C, D, A)
// and the output is whitened with A += S[2r+2], C += S[2r+3]. Rotations use
// the low lg w bits of the amount. The round keys are added, as in the RC6
// encryption data flow diagram.
//
// Timing (this design's choice): B/D whitening as the block is loaded in the
// cycle `start` is sampled, then one round per clock with two rc6_f units in
// parallel; the output whitening is folded into the last round. `done` pulses
// with `dout` valid R+1 cycles after the start cycle; `dout` holds until the
// next start. `start` is ignored while `busy`.
//
// Interface: din/dout = {D, C, B, A}, A in the low word. `s_tab` must stay
// stable while busy.
module rc6_encrypt #(
  parameter int unsigned W = 16,  // word size in bits
  parameter int unsigned R = 12   // number of rounds
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [4*W-1:0] din,
  input  logic [W-1:0]   s_tab [2*R+4],
  output logic           busy,
  output logic           done,
  output logic [4*W-1:0] dout
);

  localparam int unsigned LW = $clog2(W);
  localparam int unsigned RW = $clog2(R + 1);

  function automatic logic [W-1:0] rotl(input logic [W-1:0] x, input logic [LW-1:0] n);
    return (x << n) | (x >> (W - int'(n)));
  endfunction

  logic [W-1:0]  a_q, b_q, c_q, d_q;
  logic [RW-1:0] rnd_q;   // round being computed, 1..R

  logic [W-1:0] t, u, a_new, c_new;

  rc6_f #(.W(W)) u_f_b (.x(b_q), .y(t));
  rc6_f #(.W(W)) u_f_d (.x(d_q), .y(u));

  always_comb begin
    a_new = rotl(a_q ^ t, u[LW-1:0]) + s_tab[2*rnd_q];
    c_new = rotl(c_q ^ u, t[LW-1:0]) + s_tab[2*rnd_q + 1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_q   <= '0;
      b_q   <= '0;
      c_q   <= '0;
      d_q   <= '0;
      rnd_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          a_q   <= din[W-1:0];
          b_q   <= din[2*W-1:W]   + s_tab[0];
          c_q   <= din[3*W-1:2*W];
          d_q   <= din[4*W-1:3*W] + s_tab[1];
          rnd_q <= RW'(1);
          busy  <= 1'b1;
        end
      end else begin
        // (A, B, C, D) <= (B, C', D, A')
        b_q   <= c_new;
        d_q   <= a_new;
        rnd_q <= rnd_q + 1'b1;
        if (rnd_q == RW'(R)) begin
          a_q  <= b_q + s_tab[2*R+2];
          c_q  <= d_q + s_tab[2*R+3];
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          a_q <= b_q;
          c_q <= d_q;
        end
      end
    end
  end

  assign dout = {d_q, c_q, b_q, a_q};

endmodule
