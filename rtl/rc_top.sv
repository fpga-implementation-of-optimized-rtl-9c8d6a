// rc_top: combined RC5 / RC6 block-cipher engine with on-chip key scheduling.
//
// Two complete cipher units sit side by side behind one host interface:
// rc5_core (RC5-32/12/16 by default) and rc6_core (RC6-16/12/16 by default).
// With these defaults both ciphers work on 64-bit blocks and 128-bit keys and
// run 12 rounds, so they share the 64-bit data ports.
//
// Key loading: `key_load` starts the key expansion of both units on the same
// key, in parallel. `key_busy` is high while either is still expanding and
// `key_valid` once both tables are ready;
// `key_done` pulses when the second one finishes (RC5 needs 79 cycles, RC6 85).
// A key load is ignored while a block is in flight.
//
// Block processing: with `ready` high, `start` hands `din` to the unit chosen
// by `alg` (ALG_RC5 or ALG_RC6), in the direction chosen by `decrypt`. One
// block is in flight at a time; `done` pulses R+2 cycles later (one more for the
// output register) with the result
// on `dout`, and `done_alg` tells which cipher produced it. `dout` holds until
// the next result. A `start` while not ready is dropped.
//
// Data layout: RC5 uses din[2*W5-1:0] = {B, A}; RC6 uses din[4*W6-1:0] =
// {D, C, B, A}; A is always the low word. Unused high bits of `dout` are 0
// when the two block sizes differ. Key byte k is key[8k +: 8].
//
// Sharing the key and the data ports between the two ciphers and the
// one-block-at-a-time control are this design's choices.
module rc_top
  import rc_pkg::*;
#(
  parameter  int unsigned W5  = 32,  // RC5 word size
  parameter  int unsigned R5  = 12,  // RC5 rounds
  parameter  int unsigned W6  = 16,  // RC6 word size
  parameter  int unsigned R6  = 12,  // RC6 rounds
  parameter  int unsigned KB  = 16,  // key length in bytes
  localparam int unsigned BLK = (2*W5 > 4*W6) ? 2*W5 : 4*W6
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            key_load,
  input  logic [8*KB-1:0] key,
  output logic            key_busy,
  output logic            key_done,
  output logic            key_valid,
  input  logic            start,
  input  alg_e            alg,
  input  logic            decrypt,
  input  logic [BLK-1:0]  din,
  output logic            ready,
  output logic            busy,
  output logic            done,
  output alg_e            done_alg,
  output logic [BLK-1:0]  dout
);

  logic            k5_busy, k5_done, k5_valid, r5_ready, r5_busy, r5_done;
  logic            k6_busy, k6_done, k6_valid, r6_ready, r6_busy, r6_done;
  logic [2*W5-1:0] r5_dout;
  logic [4*W6-1:0] r6_dout;
  logic            load_ok;

  assign busy      = r5_busy | r6_busy;
  assign key_busy  = k5_busy | k6_busy;
  assign key_valid = k5_valid & k6_valid;
  // Pulses in the cycle the later of the two tables is finished.
  assign key_done  = (k5_done & (k6_valid | k6_done)) | (k6_done & k5_valid);
  assign ready     = r5_ready & r6_ready;
  assign load_ok   = key_load & ~busy;

  rc5_core #(.W(W5), .R(R5), .KB(KB)) u_rc5 (
    .clk, .rst_n,
    .key_load  (load_ok),
    .key,
    .key_busy  (k5_busy),
    .key_done  (k5_done),
    .key_valid (k5_valid),
    .start     (start & ready & (alg == ALG_RC5)),
    .decrypt,
    .din       (din[2*W5-1:0]),
    .ready     (r5_ready),
    .busy      (r5_busy),
    .done      (r5_done),
    .dout      (r5_dout)
  );

  rc6_core #(.W(W6), .R(R6), .KB(KB)) u_rc6 (
    .clk, .rst_n,
    .key_load  (load_ok),
    .key,
    .key_busy  (k6_busy),
    .key_done  (k6_done),
    .key_valid (k6_valid),
    .start     (start & ready & (alg == ALG_RC6)),
    .decrypt,
    .din       (din[4*W6-1:0]),
    .ready     (r6_ready),
    .busy      (r6_busy),
    .done      (r6_done),
    .dout      (r6_dout)
  );

  // Result register: the output of whichever unit finished last.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      done     <= 1'b0;
      done_alg <= ALG_RC5;
      dout     <= '0;
    end else begin
      done <= r5_done | r6_done;
      if (r5_done) begin
        done_alg <= ALG_RC5;
        dout     <= BLK'(r5_dout);
      end else if (r6_done) begin
        done_alg <= ALG_RC6;
        dout     <= BLK'(r6_dout);
      end
    end
  end

  // Only one unit is ever working on a block.
  a_one_in_flight: assert property (@(posedge clk) disable iff (!rst_n) !(r5_busy && r6_busy));

endmodule
