// TDM wheel position of one network element.
//
// Counts cycles modulo NSLOTS*SLOT_WORDS from reset. All routers and NIs leave reset in the
// same cycle, so they all agree on the slot number without exchanging anything; the
// source design requires this global notion of time but does not say how it is provided, and a
// common reset, released in the same clock cycle
// everywhere, is this design's choice.
// Outputs: the slot and word index of the current cycle, and those of the next cycle
// (elements that register their output look up the slot in which the word will appear).
module dael_slot_counter
  import dael_pkg::*;
#(
  parameter int NSLOTS = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  output logic [$clog2(NSLOTS)-1:0] slot,
  output logic                      word,       // 0: first word of the slot
  output logic [$clog2(NSLOTS)-1:0] next_slot,
  output logic                      next_word
);
  localparam int SW = $clog2(NSLOTS);
  logic [SW-1:0] slot_q;
  logic          word_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_q <= '0;
      word_q <= 1'b0;
    end else begin
      slot_q <= next_slot;
      word_q <= next_word;
    end
  end

  always_comb begin
    next_word = (int'(word_q) == SLOT_WORDS - 1) ? 1'b0 : word_q + 1'b1;
    next_slot = slot_q;
    if (int'(word_q) == SLOT_WORDS - 1)
      next_slot = (int'(slot_q) == NSLOTS - 1) ? '0 : slot_q + 1'b1;
  end

  assign slot = slot_q;
  assign word = word_q;

  initial assert (SLOT_WORDS == 2) else $fatal(1, "slot counter is written for 2-word slots");
endmodule
