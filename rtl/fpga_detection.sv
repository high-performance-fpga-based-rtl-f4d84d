// fpga_detection: the detection stage that sits between the Bloom filter and
// the software analyzer. For every suspicious 64-bit sub-string it confirms
// or rejects the Bloom filter's verdict and, on a match, names the one rule
// that software has to check.
//
// Structure (as published): a CAM turns the first two bytes into a 16-bit
// address, the address is extended to 19 bits, the signature RAM returns a
// 48-bit partial signature plus finish bit, and a comparator checks it
// against the remaining six bytes; the match controller (detection_ctrl)
// steps through up to eight rows per key. Outputs: match + which (19-bit
// rule number), or susp + susp_info (16-bit CAM address) when a full key
// group did not contain the sub-string.
//
// The load ports for CAM and RAM are this design's own: the published design
// keeps the rule set in memory but does not describe how it is written.
// Timing: see detection_ctrl (result 2+k cycles after acceptance, k = final
// slot; 1 cycle when the key is not in the CAM).
module fpga_detection
  import ids_pkg::*;
#(
  parameter int unsigned CAM_AW = 16,
  localparam int unsigned RAM_AW = CAM_AW + SLOT_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // suspicious sub-strings
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [DATA_W-1:0] in_data,
  // rule loading
  input  logic              cam_wr_en,
  input  logic [CAM_AW-1:0] cam_wr_addr,
  input  logic [KEY_W-1:0]  cam_wr_key,
  input  logic              cam_wr_valid,
  input  logic              ram_wr_en,
  input  logic [RAM_AW-1:0] ram_wr_addr,
  input  sig_entry_t        ram_wr_data,
  // results
  output logic              res_valid,
  output result_e           result,
  output logic              match,
  output logic [RAM_AW-1:0] which,
  output logic              susp,
  output logic [CAM_AW-1:0] susp_info
);

  logic              cam_search_en;
  logic [KEY_W-1:0]  cam_search_key;
  logic              cam_hit;
  logic [CAM_AW-1:0] cam_hit_addr;
  logic              ram_rd_en;
  logic [RAM_AW-1:0] ram_rd_addr;
  sig_entry_t        ram_rd_data;
  logic [SIG_W-1:0]  cmp_data;
  logic              cmp_eq;
  logic              cmp_last;

  cam #(.KEY_W(KEY_W), .AW(CAM_AW)) u_cam (
    .clk, .rst_n,
    .wr_en(cam_wr_en), .wr_addr(cam_wr_addr), .wr_key(cam_wr_key), .wr_valid(cam_wr_valid),
    .search_en(cam_search_en), .search_key(cam_search_key),
    .hit(cam_hit), .hit_addr(cam_hit_addr)
  );

  sig_ram #(.AW(RAM_AW)) u_ram (
    .clk,
    .wr_en(ram_wr_en), .wr_addr(ram_wr_addr), .wr_data(ram_wr_data),
    .rd_en(ram_rd_en), .rd_addr(ram_rd_addr), .rd_data(ram_rd_data)
  );

  sig_comparator u_cmp (
    .data(cmp_data), .entry(ram_rd_data), .eq(cmp_eq), .last(cmp_last)
  );

  detection_ctrl #(.CAM_AW(CAM_AW)) u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data,
    .cam_search_en, .cam_search_key, .cam_hit, .cam_hit_addr,
    .ram_rd_en, .ram_rd_addr,
    .cmp_data, .cmp_eq, .cmp_last,
    .res_valid, .result, .match, .which, .susp, .susp_info
  );

endmodule
