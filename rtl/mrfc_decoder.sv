// mrfc_decoder: receive side of the MRFC CODEC.
//
// A 32-bit frame of eight MRFC code words (slot 0 in bits [31:28]) is split
// into its words. Each goes through a flip_corrector, which compares it with
// the original code word of its slot and, where they differ, restores the
// two inverted bits; each restored word is then turned back into binary by
// adding its digit weights. Slot k of a frame carries the data value k, so
// the original code word of slot k is the MRFC encoding of k, produced here
// by an mrfc_encoder per slot.
//
// Interface and timing: frame_in and in_valid are registered together with
// the decoded result, one clock of latency. data_out holds slot 0 in bits
// [23:21]. flipped[k] marks slot k as received inverted, error[k] a word
// that matched its original neither as received nor inverted (slot k is
// bit 7-k, the same order as the data). Synchronous active-high reset.
//
// Comparison with the original word, the two-bit re-inversion and the
// weighted-sum decoding follow the CODEC's definition; the register stage,
// the valid flag and the flag outputs are this design's choices.
module mrfc_decoder
  import mrfc_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  input  logic [FRAME_CODE_W-1:0] frame_in,
  input  logic                    in_valid,
  output logic [FRAME_DATA_W-1:0] data_out,
  output logic [FRAME_WORDS-1:0]  flipped,
  output logic [FRAME_WORDS-1:0]  error,
  output logic                    out_valid
);

  logic [FRAME_DATA_W-1:0] data_d;
  logic [FRAME_WORDS-1:0]  flipped_d, error_d;

  for (genvar k = 0; k < FRAME_WORDS; k++) begin : g_slot
    localparam int unsigned HI_C = FRAME_CODE_W - 1 - CODE_W * k;
    localparam int unsigned HI_D = FRAME_DATA_W - 1 - DATA_W * k;
    localparam int unsigned FB   = FRAME_WORDS - 1 - k;

    code_t ref_word, fixed_word;
    data_t value;

    mrfc_encoder u_ref (
      .data (data_t'(k)),
      .code (ref_word)
    );

    flip_corrector u_fix (
      .rx_word  (frame_in[HI_C -: CODE_W]),
      .ref_word (ref_word),
      .word     (fixed_word),
      .flipped  (flipped_d[FB]),
      .error    (error_d[FB])
    );

    mrfc_to_binary u_dec (
      .code (fixed_word),
      .data (value)
    );

    assign data_d[HI_D -: DATA_W] = value;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      data_out  <= '0;
      flipped   <= '0;
      error     <= '0;
      out_valid <= 1'b0;
    end else begin
      data_out  <= data_d;
      flipped   <= flipped_d;
      error     <= error_d;
      out_valid <= in_valid;
    end
  end

endmodule
