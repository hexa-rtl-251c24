// hexa_top: the HEXA applications side by side.
//
//   * u_ip  (hexa_ip_lookup): IP longest-prefix match over a binary trie in
//     HEXA form: 2-bit discriminators (three cells per node, value 0 = no
//     child) and 1.1 cells per trie node, sized for a 100,000-node trie.
//   * u_str (bhexa_matcher): Aho-Corasick string matcher in bounded-HEXA form,
//     256-symbol alphabet, 1 discriminator bit and 2 length bits per
//     transition (identifiers of up to 3 symbols with the identity length
//     table; lengths up to 16 with a reprogrammed table), about 10% more cells
//     than nodes for a 64,887-character pattern set, and a 64-entry spill CAM.
//   * u_bs  (bitsplit_matcher): the bit-split form of the string matcher:
//     four machines each reading 2 bits of every byte, each stored in
//     bounded-HEXA form with 5-bit transitions, for one group of 16 patterns.
//
// The three engines share only the clock and reset; each has its own programming
// port (driven by a control processor that computes the node-to-cell
// mapping) and its own request/result ports, passed straight through. See the
// two submodules for their interfaces and timing. The sizes follow the
// evaluated configurations of the method; the CAM size, the next-hop width
// and the 32-bit key are this design's choices.
//
// Lint note: rst_n reaches asynchronous resets and assertion disable
// conditions in the engines, which Verilator reports as a net used both ways.
module hexa_top
  import hexa_pkg::*;
#(
  parameter int unsigned IP_ADDR_W    = 32,
  parameter int unsigned IP_DISC_W    = 2,
  parameter int unsigned IP_CELLS     = 110000,
  parameter int unsigned IP_NH_W      = 8,
  parameter hash_kind_e  IP_HASH      = HASH_MIX,
  parameter int unsigned STR_SYM_W    = 8,
  parameter int unsigned STR_DISC_W   = 1,
  parameter int unsigned STR_LEN_W    = 2,
  parameter int unsigned STR_MAX_LEN  = 16,
  parameter int unsigned STR_CELLS    = 71377,
  parameter int unsigned STR_SPILL    = 64,
  parameter int unsigned STR_CAM_SYMS = 64,
  parameter hash_kind_e  STR_HASH     = HASH_MIX,
  localparam int unsigned IP_DW  = $clog2(IP_ADDR_W + 1),
  localparam int unsigned IP_AW  = (IP_CELLS > 1) ? $clog2(IP_CELLS) : 1,
  localparam int unsigned IP_EW  = 1 + 2 * IP_DISC_W,
  localparam int unsigned STR_TW = STR_DISC_W + STR_LEN_W,
  localparam int unsigned STR_RW = $clog2(STR_CELLS + STR_SPILL),
  localparam int unsigned STR_LW = $clog2(STR_MAX_LEN + 1),
  localparam int unsigned STR_SW = (STR_SPILL > 1) ? $clog2(STR_SPILL) : 1,
  localparam int unsigned STR_CDW = $clog2(STR_CAM_SYMS + 1),
  localparam int unsigned BS_RW  = 9
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // ---- IP lookup: control plane
  input  logic [IP_DISC_W-1:0]              ip_cfg_root_disc,
  input  logic                              ip_fp_wr_en,
  input  logic [IP_AW-1:0]                  ip_fp_wr_addr,
  input  logic [IP_EW-1:0]                  ip_fp_wr_data,
  input  logic                              ip_nh_wr_en,
  input  logic [IP_AW-1:0]                  ip_nh_wr_addr,
  input  logic [IP_NH_W-1:0]                ip_nh_wr_data,
  // ---- IP lookup: requests and responses
  input  logic                              ip_req_valid,
  output logic                              ip_req_ready,
  input  logic [IP_ADDR_W-1:0]              ip_req_key,
  output logic                              ip_resp_valid,
  output logic                              ip_resp_found,
  output logic [IP_DW-1:0]                  ip_resp_len,
  output logic [IP_AW-1:0]                  ip_resp_loc,
  output logic [IP_NH_W-1:0]                ip_resp_next_hop,
  // ---- string matcher: control plane
  input  logic [STR_RW-1:0]                 str_cfg_root_row,
  input  logic                              str_tr_wr_en,
  input  logic [STR_RW-1:0]                 str_tr_wr_row,
  input  logic [STR_SYM_W-1:0]              str_tr_wr_sym,
  input  logic [STR_TW-1:0]                 str_tr_wr_code,
  input  logic                              str_mf_wr_en,
  input  logic [STR_RW-1:0]                 str_mf_wr_row,
  input  logic                              str_mf_wr_flag,
  input  logic                              str_cam_wr_en,
  input  logic [STR_SW-1:0]                 str_cam_wr_slot,
  input  logic                              str_cam_wr_valid,
  input  logic [STR_CDW-1:0]                str_cam_wr_depth,
  input  logic [STR_CAM_SYMS*STR_SYM_W-1:0] str_cam_wr_str,
  input  logic                              str_lt_wr_en,
  input  logic [STR_LEN_W-1:0]              str_lt_wr_code,
  input  logic [STR_LW-1:0]                 str_lt_wr_len,
  // ---- string matcher: symbol stream and results
  input  logic                              str_in_valid,
  input  logic                              str_in_start,
  input  logic [STR_SYM_W-1:0]              str_in_sym,
  output logic                              str_out_valid,
  output logic                              str_out_match,
  output logic [STR_RW-1:0]                 str_out_row,
  output logic                              str_out_spill,
  output logic                              str_out_miss,
  // ---- bit-split string matcher (four 2-bit machines, 16-pattern group)
  input  logic [3:0][BS_RW-1:0]             bs_cfg_root_row,
  input  logic                              bs_tr_wr_en,
  input  logic [1:0]                        bs_tr_wr_mach,
  input  logic [BS_RW-1:0]                  bs_tr_wr_row,
  input  logic [1:0]                        bs_tr_wr_sym,
  input  logic [4:0]                        bs_tr_wr_code,
  input  logic                              bs_pmv_wr_en,
  input  logic [1:0]                        bs_pmv_wr_mach,
  input  logic [BS_RW-1:0]                  bs_pmv_wr_row,
  input  logic [15:0]                       bs_pmv_wr_vec,
  input  logic                              bs_cam_wr_en,
  input  logic [1:0]                        bs_cam_wr_mach,
  input  logic [3:0]                        bs_cam_wr_slot,
  input  logic                              bs_cam_wr_valid,
  input  logic [6:0]                        bs_cam_wr_depth,
  input  logic [127:0]                      bs_cam_wr_str,
  input  logic                              bs_lt_wr_en,
  input  logic [2:0]                        bs_lt_wr_code,
  input  logic [4:0]                        bs_lt_wr_len,
  input  logic                              bs_in_valid,
  input  logic                              bs_in_start,
  input  logic [7:0]                        bs_in_sym,
  output logic                              bs_out_valid,
  output logic                              bs_out_match,
  output logic [15:0]                       bs_out_vec,
  output logic                              bs_out_spill,
  output logic                              bs_out_miss
);

  hexa_ip_lookup #(
    .ADDR_W(IP_ADDR_W), .DISC_W(IP_DISC_W), .CELLS(IP_CELLS), .NH_W(IP_NH_W),
    .HASH_KIND(IP_HASH)
  ) u_ip (
    .clk, .rst_n,
    .cfg_root_disc (ip_cfg_root_disc),
    .fp_wr_en      (ip_fp_wr_en),
    .fp_wr_addr    (ip_fp_wr_addr),
    .fp_wr_data    (ip_fp_wr_data),
    .nh_wr_en      (ip_nh_wr_en),
    .nh_wr_addr    (ip_nh_wr_addr),
    .nh_wr_data    (ip_nh_wr_data),
    .req_valid     (ip_req_valid),
    .req_ready     (ip_req_ready),
    .req_key       (ip_req_key),
    .resp_valid    (ip_resp_valid),
    .resp_found    (ip_resp_found),
    .resp_len      (ip_resp_len),
    .resp_loc      (ip_resp_loc),
    .resp_next_hop (ip_resp_next_hop)
  );

  bhexa_matcher #(
    .SYM_W(STR_SYM_W), .DISC_W(STR_DISC_W), .LEN_W(STR_LEN_W), .MAX_LEN(STR_MAX_LEN),
    .CELLS(STR_CELLS), .SPILL(STR_SPILL), .CAM_SYMS(STR_CAM_SYMS), .HASH_KIND(STR_HASH)
  ) u_str (
    .clk, .rst_n,
    .cfg_root_row (str_cfg_root_row),
    .tr_wr_en     (str_tr_wr_en),
    .tr_wr_row    (str_tr_wr_row),
    .tr_wr_sym    (str_tr_wr_sym),
    .tr_wr_code   (str_tr_wr_code),
    .mf_wr_en     (str_mf_wr_en),
    .mf_wr_row    (str_mf_wr_row),
    .mf_wr_flag   (str_mf_wr_flag),
    .cam_wr_en    (str_cam_wr_en),
    .cam_wr_slot  (str_cam_wr_slot),
    .cam_wr_valid (str_cam_wr_valid),
    .cam_wr_depth (str_cam_wr_depth),
    .cam_wr_str   (str_cam_wr_str),
    .lt_wr_en     (str_lt_wr_en),
    .lt_wr_code   (str_lt_wr_code),
    .lt_wr_len    (str_lt_wr_len),
    .in_valid     (str_in_valid),
    .in_start     (str_in_start),
    .in_sym       (str_in_sym),
    .out_valid    (str_out_valid),
    .out_match    (str_out_match),
    .out_row      (str_out_row),
    .out_spill    (str_out_spill),
    .out_miss     (str_out_miss)
  );


  // bit-split matcher at its own defaults (widths above follow them)
  bitsplit_matcher u_bs (
    .clk, .rst_n,
    .cfg_root_row (bs_cfg_root_row),
    .tr_wr_en     (bs_tr_wr_en),
    .tr_wr_mach   (bs_tr_wr_mach),
    .tr_wr_row    (bs_tr_wr_row),
    .tr_wr_sym    (bs_tr_wr_sym),
    .tr_wr_code   (bs_tr_wr_code),
    .pmv_wr_en    (bs_pmv_wr_en),
    .pmv_wr_mach  (bs_pmv_wr_mach),
    .pmv_wr_row   (bs_pmv_wr_row),
    .pmv_wr_vec   (bs_pmv_wr_vec),
    .cam_wr_en    (bs_cam_wr_en),
    .cam_wr_mach  (bs_cam_wr_mach),
    .cam_wr_slot  (bs_cam_wr_slot),
    .cam_wr_valid (bs_cam_wr_valid),
    .cam_wr_depth (bs_cam_wr_depth),
    .cam_wr_str   (bs_cam_wr_str),
    .lt_wr_en     (bs_lt_wr_en),
    .lt_wr_code   (bs_lt_wr_code),
    .lt_wr_len    (bs_lt_wr_len),
    .in_valid     (bs_in_valid),
    .in_start     (bs_in_start),
    .in_sym       (bs_in_sym),
    .out_valid    (bs_out_valid),
    .out_match    (bs_out_match),
    .out_vec      (bs_out_vec),
    .out_spill    (bs_out_spill),
    .out_miss     (bs_out_miss)
  );

endmodule
