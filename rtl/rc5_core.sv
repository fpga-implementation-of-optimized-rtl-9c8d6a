// rc5_core: complete RC5-w/r/b unit with on-chip key expansion.
//
// Holds the three RC5 modules: the key expansion (rc_key_expand with
// T = 2r+2 round keys), the encryption datapath (rc5_encrypt) and the
// decryption datapath (rc5_decrypt), all reading one round-key table.
// A key is loaded with `key_load`; while its table is built `key_busy` is
// high, `key_done` pulses when it is finished, and `key_valid` is high once a table is ready. A block is accepted
// with `start` when `ready` is high (a valid table, nothing in flight);
// `decrypt` selects the direction. `done` pulses with the result on `dout`,
// which holds until the next result.
//
// Defaults are RC5-32/12/16: 32-bit words (a 64-bit block), 12 rounds and a
// 16-byte key. Timing: key expansion 3*max(2r+2, c) + 1 = 79 cycles, one
// block r + 1 = 13 cycles from start to done. Requests that arrive when not
// ready are dropped (this design's choice; `ready` tells the host).
//
// Interface: key byte k is key[8k +: 8]; din/dout = {B, A}. Synchronous
// active-low reset.
module rc5_core #(
  parameter int unsigned W  = 32,  // word size in bits
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
  input  logic [2*W-1:0]   din,
  output logic             ready,
  output logic             busy,
  output logic             done,
  output logic [2*W-1:0]   dout
);

  localparam int unsigned T = 2*R + 2;

  logic [W-1:0]   s_tab [T];
  logic           enc_busy, enc_done, dec_busy, dec_done;
  logic           enc_start, dec_start;
  logic [2*W-1:0] enc_dout, dec_dout;
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

  rc5_encrypt #(.W(W), .R(R)) u_enc (
    .clk, .rst_n,
    .start (enc_start),
    .din,
    .s_tab,
    .busy  (enc_busy),
    .done  (enc_done),
    .dout  (enc_dout)
  );

  rc5_decrypt #(.W(W), .R(R)) u_dec (
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
