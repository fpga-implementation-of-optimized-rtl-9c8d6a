// rc_key_expand: round-key table generator shared by RC5 and RC6.
//
// Both ciphers expand a b-byte secret key into a table S[0..T-1] of w-bit
// round keys (T = 2r+2 for RC5, T = 2r+4 for RC6) by the same procedure:
//   1. the key bytes are loaded little-endian into c = ceil(b/u) words L[],
//      u = w/8 (unused high bytes of the last word are zero);
//   2. S[i] = P_w + i*Q_w for i = 0..T-1;
//   3. with A = B = i = j = 0, repeat 3*max(T,c) times:
//        A = S[i] = (S[i] + A + B) <<< 3
//        B = L[j] = (L[j] + A + B) <<< (A + B)
//        i = (i+1) mod T,  j = (j+1) mod c
// The algorithm is the one given for RC5; using it unchanged with T = 2r+4
// for RC6 is this design's reading of "2r+4 words are derived" for RC6.
//
// Micro-architecture (this design's choice): step 1 and 2 take the cycle in
// which `start` is sampled (the constant table P+i*Q is formed in parallel),
// then step 3 runs one mixing iteration per clock. `done` pulses in the
// cycle after the last iteration, 3*max(T,c) + 1 cycles after `start`, and
// `valid` stays high from then until the next `start`. The table is held in
// registers and presented in full on `s_tab`, so the cipher datapaths can
// read two round keys per cycle. `start` is ignored while `busy`.
//
// Interface: key byte k is key[8k +: 8]. Synchronous active-low reset.
module rc_key_expand
  import rc_pkg::*;
#(
  parameter int unsigned W  = 32,  // word size in bits (16, 32 or 64)
  parameter int unsigned T  = 26,  // number of round keys (2r+2 for RC5-32/12)
  parameter int unsigned KB = 16   // secret key length in bytes
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [8*KB-1:0]   key,
  output logic              busy,
  output logic              done,
  output logic              valid,
  output logic [W-1:0]      s_tab [T]
);

  localparam int unsigned U     = W / 8;
  localparam int unsigned C     = key_words(KB, W);
  localparam int unsigned NITER = 3 * max_u(T, C);
  localparam int unsigned LW    = $clog2(W);
  localparam int unsigned IW    = (T > 1) ? $clog2(T) : 1;
  localparam int unsigned JW    = (C > 1) ? $clog2(C) : 1;
  localparam int unsigned CW    = $clog2(NITER + 1);

  localparam logic [W-1:0] PW = W'(magic_p(W));
  localparam logic [W-1:0] QW = W'(magic_q(W));

  function automatic logic [W-1:0] rotl(input logic [W-1:0] x, input logic [LW-1:0] n);
    return (x << n) | (x >> (W - int'(n)));
  endfunction

  logic [W-1:0]  s_q [T];
  logic [W-1:0]  l_q [C];
  logic [W-1:0]  a_q, b_q;
  logic [IW-1:0] i_q;
  logic [JW-1:0] j_q;
  logic [CW-1:0] cnt_q;

  // One mixing iteration.
  logic [W-1:0] a_new, b_new, ab_sum;
  always_comb begin
    a_new  = rotl(s_q[i_q] + a_q + b_q, LW'(3));
    ab_sum = a_new + b_q;
    b_new  = rotl(l_q[j_q] + ab_sum, ab_sum[LW-1:0]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      valid <= 1'b0;
      a_q   <= '0;
      b_q   <= '0;
      i_q   <= '0;
      j_q   <= '0;
      cnt_q <= '0;
      for (int k = 0; k < T; k++) s_q[k] <= '0;
      for (int k = 0; k < C; k++) l_q[k] <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          valid <= 1'b0;
          a_q   <= '0;
          b_q   <= '0;
          i_q   <= '0;
          j_q   <= '0;
          cnt_q <= '0;
          for (int k = 0; k < T; k++) s_q[k] <= PW + W'(k) * QW;
          for (int k = 0; k < C; k++)
            for (int m = 0; m < U; m++)
              l_q[k][8*m +: 8] <= (k*U + m < KB) ? key[8*(k*U+m) +: 8] : 8'h00;
        end
      end else begin
        s_q[i_q] <= a_new;
        l_q[j_q] <= b_new;
        a_q      <= a_new;
        b_q      <= b_new;
        i_q      <= (i_q == IW'(T - 1)) ? '0 : i_q + 1'b1;
        j_q      <= (j_q == JW'(C - 1)) ? '0 : j_q + 1'b1;
        cnt_q    <= cnt_q + 1'b1;
        if (cnt_q == CW'(NITER - 1)) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          valid <= 1'b1;
        end
      end
    end
  end

  assign s_tab = s_q;

endmodule
