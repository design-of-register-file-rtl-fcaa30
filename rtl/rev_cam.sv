// rev_cam: content-addressable memory built around the reversible register
// file; the top of the design.
//
// A search word (key) is compared in parallel with the words of the look-up
// table (cam_lut). The match lines go to the 4:2 encoder (cam_encoder), whose
// index is decoded again by the 2:4 reversible decoder (cam_decoder) into the
// one-hot location of the word, match_loc. The same index addresses read
// port 1 of the register file, which returns the data stored with that word,
// match_data: register i of the file holds the data that belongs to
// look-up-table word i. found says that some word matched; match_addr,
// match_loc and match_data mean nothing while it is low. When several words
// match, the lowest index is reported.
//
// The chain look-up table -> encoder -> decoder -> register file follows the
// published CAM block diagram; how the index reaches the register file, the
// lowest-index priority and the look-up-table write port are this design's
// choices.
//
// The register file's write port and its second read port are brought out
// unchanged, so the file can be loaded and inspected. Everything is
// combinational or level-sensitive (no clock):
//   - lut_we high writes lut_wword into look-up-table word lut_waddr;
//   - rf_ctrl low (RF_WRITE) writes rf_wdata into register rf_waddr;
//   - rf_ctrl high (RF_READ) enables match_data and rf_rdata2; while it is
//     low both give 0.
// Search results follow key, the stored words and rf_ctrl combinationally.
module rev_cam #(
  parameter int unsigned DATA_W = rf_pkg::RF_DATA_W,
  parameter int unsigned ADDR_W = rf_pkg::RF_ADDR_W,
  parameter int unsigned KEY_W  = rf_pkg::CAM_KEY_W
) (
  // look-up-table write
  input  logic              lut_we,
  input  logic [rf_pkg::CAM_IDX_W-1:0] lut_waddr,
  input  logic [KEY_W-1:0]  lut_wword,
  // register file
  input  rf_pkg::rf_ctrl_e  rf_ctrl,
  input  logic [ADDR_W-1:0] rf_waddr,
  input  logic [DATA_W-1:0] rf_wdata,
  input  logic [ADDR_W-1:0] rf_raddr2,
  output logic [DATA_W-1:0] rf_rdata2,
  // search
  input  logic [KEY_W-1:0]  key,
  output logic              found,
  output logic [rf_pkg::CAM_IDX_W-1:0] match_addr,
  output logic [3:0]        match_loc,
  output logic [DATA_W-1:0] match_data
);
  logic [3:0] match;

  cam_lut #(.WORDS(4), .KEY_W(KEY_W)) u_lut (
    .we    (lut_we),
    .waddr (lut_waddr),
    .wword (lut_wword),
    .key   (key),
    .match (match)
  );

  cam_encoder u_enc (
    .match (match),
    .addr  (match_addr),
    .hit   (found)
  );

  cam_decoder u_dec (
    .addr (match_addr),
    .loc  (match_loc)
  );

  register_file #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_rf (
    .ctrl   (rf_ctrl),
    .waddr  (rf_waddr),
    .wdata  (rf_wdata),
    .raddr1 (ADDR_W'(match_addr)),
    .raddr2 (rf_raddr2),
    .rdata1 (match_data),
    .rdata2 (rf_rdata2)
  );
endmodule
