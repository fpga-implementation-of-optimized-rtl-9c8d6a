// rc6_core: complete RC6-w/r/b unit with on-chip key schedule.
//
// Holds the three RC6 modules: the key schedule (rc_key_expand with
// T = 2r+4 round keys), the encryption datapath (rc6_encrypt) and the
// decryption datapath (rc6_decrypt), all reading one round-key table.
// A key is loaded with `key_load`; while its table is built `key_busy` is
// high, `key_done` pulses when it is finished, and `key_valid` is high once a table is ready. A block is accepted
// with `start` when `ready` is high (a valid table, nothing in flight);
// `decrypt` selects the direction. `done` pulses with the result on `dout`,
// which holds until the next result.
//
// Defaults are RC6-16/12/16: 16-bit words, so the four-word block is 64 bits
// wide, 12 rounds and a 16-byte key. With W = 32, R = 20 the unit is the
// standard RC6-32/20/16 with a 128-bit block. Timing: key schedule
// 3*max(2r+4, c) + 1 = 85 cycles, one block r + 1 = 13 cycles from start to
// done. Requests that arrive when not ready are dropped (this design's
// choice; `ready` tells the host).
//
// Interface: key byte k is key[8k +: 8]; din/dout = {D, C, B, A}.
// Synchronous active-low reset.
module rc6_core #(
  parameter int unsigned W  = 16,  // word size in bits
  parameter int unsigned R  = 12,  // number of rounds
  parameter int unsigned KB = 16   // key length in bytes
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             key_load,
  input  logic [8*KB-1:0]  key,
  output logic             key_busy,
  output logic             key_done,
  output logic             key_valid,
  input  logic             start,
  input  logic             decrypt,
  input  logic [4*W-1:0]   din,
  output logic             ready,
  output logic             busy,
  output logic             done,
  output logic [4*W-1:0]   dout
);

  localparam int unsigned T = 2*R + 4;

  logic [W-1:0]   s_tab [T];
  logic           enc_busy, enc_done, dec_busy, dec_done;
  logic           enc_start, dec_start;
  logic [4*W-1:0] enc_dout, dec_dout;
  logic           last_dec_q;

  assign busy      = enc_busy | dec_busy;
  assign ready     = key_valid & ~key_busy & ~busy;
  assign enc_start = start & ready & ~decrypt;
  assign dec_start = start & ready &  decrypt;

  rc_key_expand #(.W(W), .T(T), .KB(KB)) u_key (
    .clk, .rst_n,
    .start (key_load & ~busy),
    .key,
    .busy  (key_busy),
    .done  (key_done),
    .valid (key_valid),
    .s_tab
  );

  rc6_encrypt #(.W(W), .R(R)) u_enc (
    .clk, .rst_n,
    .start (enc_start),
    .din,
    .s_tab,
    .busy  (enc_busy),
    .done  (enc_done),
    .dout  (enc_dout)
  );

  rc6_decrypt #(.W(W), .R(R)) u_dec (
    .clk, .rst_n,
    .start (dec_start),
    .din,
    .s_tab,
    .busy  (dec_busy),
    .done  (dec_done),
    .dout  (dec_dout)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)         last_dec_q <= 1'b0;
    else if (enc_start) last_dec_q <= 1'b0;
    else if (dec_start) last_dec_q <= 1'b1;
  end

  assign done = enc_done | dec_done;
  assign dout = last_dec_q ? dec_dout : enc_dout;

  // The table must not change under a running block.
  a_key_stable: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !key_busy);

endmodule
