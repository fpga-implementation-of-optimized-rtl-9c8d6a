// rc6_decrypt: iterative RC6-w/r decryption datapath.
//
// The inverse of rc6_encrypt. After C -= S[2r+3], A -= S[2r+2], for
// i = r down to 1:
//   (A, B, C, D) = (D, A, B, C)
//   u = f(D),  t = f(B)            with f(x) = (x(2x+1)) <<< lg w  (rc6_f)
//   C = ((C - S[2i+1]) >>> t) xor u
//   A = ((A - S[2i])   >>> u) xor t
// and finally D -= S[1], B -= S[0].
//
// Timing (this design's choice): the input un-whitening is done as the block
// is loaded in the cycle `start` is sampled, then one round per clock with
// two rc6_f units; the final D/B un-whitening is folded into the last round.
// `done` pulses with `dout` valid R+1 cycles after the start cycle; `dout`
// holds until the next start. `start` is ignored while `busy`.
//
// Interface: din/dout = {D, C, B, A}, A in the low word. `s_tab` must stay
// stable while busy.
module rc6_decrypt #(
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

  function automatic logic [W-1:0] rotr(input logic [W-1:0] x, input logic [LW-1:0] n);
    return (x >> n) | (x << (W - int'(n)));
  endfunction

  logic [W-1:0]  a_q, b_q, c_q, d_q;
  logic [RW-1:0] rnd_q;   // round being undone, R..1

  // After the rotation (A, B, C, D) = (D, A, B, C) the round sees:
  //   A' = d_q, B' = a_q, C' = b_q, D' = c_q
  logic [W-1:0] t, u, a_new, c_new;

  rc6_f #(.W(W)) u_f_b (.x(a_q), .y(t));   // t = f(B')
  rc6_f #(.W(W)) u_f_d (.x(c_q), .y(u));   // u = f(D')

  always_comb begin
    c_new = rotr(b_q - s_tab[2*rnd_q + 1], t[LW-1:0]) ^ u;
    a_new = rotr(d_q - s_tab[2*rnd_q], u[LW-1:0]) ^ t;
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
          a_q   <= din[W-1:0]     - s_tab[2*R+2];
          b_q   <= din[2*W-1:W];
          c_q   <= din[3*W-1:2*W] - s_tab[2*R+3];
          d_q   <= din[4*W-1:3*W];
          rnd_q <= RW'(R);
          busy  <= 1'b1;
        end
      end else begin
        a_q   <= a_new;
        c_q   <= c_new;
        rnd_q <= rnd_q - 1'b1;
        if (rnd_q == RW'(1)) begin
          b_q  <= a_q - s_tab[0];
          d_q  <= c_q - s_tab[1];
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          b_q <= a_q;
          d_q <= c_q;
        end
      end
    end
  end

  assign dout = {d_q, c_q, b_q, a_q};

endmodule
