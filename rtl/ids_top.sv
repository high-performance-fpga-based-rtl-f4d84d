// ids_top: the hardware part of the memory-based intrusion detector.
//
// Payload bytes stream into the Bloom filter, which flags 8-byte windows
// that may start a known signature. Flagged windows wait in a small buffer
// and are then checked exactly by the detection stage (CAM + signature RAM +
// comparator). Per window the result is: not suspicious (Bloom false
// positive), a match with the 19-bit serial number of the one rule software
// must check, or suspicious information (16-bit CAM address) when the
// window's key group overflowed the eight slots and software has to search
// that group itself. The software analyzer is outside this module: the
// result ports are its interface.
//
// Chain and stage contents follow the published architecture; the Bloom
// filter hashing, buffer depth, handshakes and load ports are this design's.
//
// Interface and timing:
//   pkt_start/byte_valid/byte_in  payload, one byte per cycle, never stalled.
//   bf_wr_*, cam_wr_*, ram_wr_*   rule-set loading (see the stage modules).
//   sus_valid/sus_data            windows flagged by the Bloom filter.
//   buf_full                      the buffer holds FIFO_DEPTH windows.
//   overflow                      a flagged window was lost: buffer full.
//   res_valid/result/match/which/susp/susp_info  one result per flagged
//                                 window, 2+k cycles after it leaves the
//                                 buffer (k = slot where the search ended;
//                                 1 cycle when the key is not in the CAM).
module ids_top
  import ids_pkg::*;
#(
  parameter int unsigned CAM_AW     = 16,
  parameter int unsigned BF_NH      = 4,
  parameter int unsigned BF_MW      = 16,
  parameter int unsigned FIFO_DEPTH = 8,
  localparam int unsigned RAM_AW    = CAM_AW + SLOT_W,
  localparam int unsigned SEL_W     = (BF_NH > 1) ? $clog2(BF_NH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // payload
  input  logic              pkt_start,
  input  logic              byte_valid,
  input  logic [7:0]        byte_in,
  // rule-set loading
  input  logic              bf_wr_en,
  input  logic [SEL_W-1:0]  bf_wr_sel,
  input  logic [BF_MW-1:0]  bf_wr_idx,
  input  logic              bf_wr_bit,
  input  logic              cam_wr_en,
  input  logic [CAM_AW-1:0] cam_wr_addr,
  input  logic [KEY_W-1:0]  cam_wr_key,
  input  logic              cam_wr_valid,
  input  logic              ram_wr_en,
  input  logic [RAM_AW-1:0] ram_wr_addr,
  input  sig_entry_t        ram_wr_data,
  // Bloom filter activity
  output logic              sus_valid,
  output logic [DATA_W-1:0] sus_data,
  output logic              window_tested,
  output logic              buf_full,
  output logic              overflow,
  // results to the software analyzer
  output logic              res_valid,
  output result_e           result,
  output logic              match,
  output logic [RAM_AW-1:0] which,
  output logic              susp,
  output logic [CAM_AW-1:0] susp_info
);

  logic              fifo_empty, fifo_rd;
  logic [DATA_W-1:0] fifo_data;
  logic              det_ready;

  bloom_filter #(.NH(BF_NH), .MW(BF_MW)) u_bloom (
    .clk, .rst_n,
    .pkt_start, .byte_valid, .byte_in,
    .wr_en(bf_wr_en), .wr_sel(bf_wr_sel), .wr_idx(bf_wr_idx), .wr_bit(bf_wr_bit),
    .sus_valid, .sus_data, .window_tested
  );

  suspect_fifo #(.W(DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en(sus_valid), .wr_data(sus_data),
    .rd_en(fifo_rd), .rd_data(fifo_data),
    .empty(fifo_empty), .full(buf_full),
    .overflow
  );

  assign fifo_rd = !fifo_empty && det_ready;

  fpga_detection #(.CAM_AW(CAM_AW)) u_det (
    .clk, .rst_n,
    .in_valid(!fifo_empty), .in_ready(det_ready), .in_data(fifo_data),
    .cam_wr_en, .cam_wr_addr, .cam_wr_key, .cam_wr_valid,
    .ram_wr_en, .ram_wr_addr, .ram_wr_data,
    .res_valid, .result, .match, .which, .susp, .susp_info
  );

endmodule
