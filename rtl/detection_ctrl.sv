// detection_ctrl: the match controller of the detection stage. It walks one
// suspicious 64-bit sub-string through CAM, signature RAM and comparator and
// decides between "matches rule N", "needs software (suspicious information)"
// and "not suspicious".
//
// Flow (as in the published flow chart):
//   1. bits 63:48 of the sub-string go to the CAM;
//   2. on a CAM hit the 16-bit CAM address is extended with slot 000 to a
//      19-bit RAM address and that row is read;
//   3. the comparator checks bits 47:0 against the row. Equal: report a
//      match, the 19-bit address being the rule's serial number. Not equal
//      and finish bit 0: address + 1 and compare the next row. Not equal in
//      the eighth slot (111): the key group may hold more signatures than
//      fit, so the 16-bit CAM address is sent as suspicious information for
//      software to finish the search. Otherwise: not suspicious.
// A CAM miss is reported as not suspicious (a Bloom filter false positive).
// Treating a mismatch in slot 111 as "suspicious" even when its finish bit is
// 0 (an ill-formed table) is this design's choice, so the slot never wraps.
//
// Interface and timing (handshake and cycle counts are this design's own):
//   in_valid/in_ready/in_data  valid-ready input; in_ready is high only in
//                              IDLE, so one sub-string is handled at a time.
//   A sub-string accepted at edge t gives its CAM result after t, its first
//   RAM row after t+1, and its result registered at edge t+2+k when the
//   decision is taken on slot k (k = 0..7). A CAM miss is reported at t+1.
//   res_valid pulses for one cycle per sub-string with result; match and
//   susp pulse with it; which and susp_info hold their last value.
module detection_ctrl
  import ids_pkg::*;
#(
  parameter int unsigned CAM_AW = 16,
  localparam int unsigned RAM_AW = CAM_AW + SLOT_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // suspicious sub-strings in
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [DATA_W-1:0] in_data,
  // CAM
  output logic              cam_search_en,
  output logic [KEY_W-1:0]  cam_search_key,
  input  logic              cam_hit,
  input  logic [CAM_AW-1:0] cam_hit_addr,
  // signature RAM
  output logic              ram_rd_en,
  output logic [RAM_AW-1:0] ram_rd_addr,
  // comparator
  output logic [SIG_W-1:0]  cmp_data,
  input  logic              cmp_eq,
  input  logic              cmp_last,
  // results
  output logic              res_valid,
  output result_e           result,
  output logic              match,
  output logic [RAM_AW-1:0] which,
  output logic              susp,
  output logic [CAM_AW-1:0] susp_info
);

  typedef enum logic [1:0] {S_IDLE, S_LOOKUP, S_COMPARE} state_e;

  state_e             state;
  logic [SIG_W-1:0]   data_q;   // bits 47:0 of the sub-string under test
  logic [CAM_AW-1:0]  group_q;  // CAM address of its key group
  logic [SLOT_W-1:0]  slot_q;   // slot of the row now at the comparator

  assign in_ready       = (state == S_IDLE);
  assign cam_search_en  = (state == S_IDLE) && in_valid;
  assign cam_search_key = in_data[DATA_W-1 -: KEY_W];
  assign cmp_data       = data_q;

  logic last_slot;
  assign last_slot = (slot_q == {SLOT_W{1'b1}});

  // RAM read requests: first row on a CAM hit, next row on a mismatch.
  always_comb begin
    ram_rd_en   = 1'b0;
    ram_rd_addr = {group_q, slot_q};
    if (state == S_LOOKUP && cam_hit) begin
      ram_rd_en   = 1'b1;
      ram_rd_addr = {cam_hit_addr, {SLOT_W{1'b0}}};
    end else if (state == S_COMPARE && !cmp_eq && !cmp_last && !last_slot) begin
      ram_rd_en   = 1'b1;
      ram_rd_addr = {group_q, slot_q + SLOT_W'(1)};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      data_q    <= '0;
      group_q   <= '0;
      slot_q    <= '0;
      res_valid <= 1'b0;
      result    <= RES_CLEAN;
      match     <= 1'b0;
      susp      <= 1'b0;
      which     <= '0;
      susp_info <= '0;
    end else begin
      res_valid <= 1'b0;
      match     <= 1'b0;
      susp      <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (in_valid) begin
            data_q <= in_data[SIG_W-1:0];
            state  <= S_LOOKUP;
          end
        end
        S_LOOKUP: begin
          if (cam_hit) begin
            group_q <= cam_hit_addr;
            slot_q  <= '0;
            state   <= S_COMPARE;
          end else begin
            res_valid <= 1'b1;
            result    <= RES_CLEAN;
            state     <= S_IDLE;
          end
        end
        S_COMPARE: begin
          if (cmp_eq) begin
            res_valid <= 1'b1;
            result    <= RES_MATCH;
            match     <= 1'b1;
            which     <= {group_q, slot_q};
            state     <= S_IDLE;
          end else if (last_slot) begin
            res_valid <= 1'b1;
            result    <= RES_SUSPECT;
            susp      <= 1'b1;
            susp_info <= group_q;
            state     <= S_IDLE;
          end else if (cmp_last) begin
            res_valid <= 1'b1;
            result    <= RES_CLEAN;
            state     <= S_IDLE;
          end else begin
            slot_q <= slot_q + SLOT_W'(1);
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Exactly one kind of result per sub-string.
  a_one_result: assert property (@(posedge clk) disable iff (!rst_n)
    !(match && susp));
  a_match_flags: assert property (@(posedge clk) disable iff (!rst_n)
    (match || susp) |-> res_valid);

endmodule
