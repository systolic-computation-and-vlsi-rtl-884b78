// systolic_suite: the systolic designs side by side.
//
// The designs do not share data; each keeps its own ports, prefixed by the
// design it belongs to, and all run from one clock and one active-low
// reset:
//   inv_   N x N systolic matrix inverter (Gauss-Jordan, no pivoting)
//   pq_    linear systolic priority queue (INSERT / XMIN)
//   fq_    linear systolic first-in first-out queue
//   st_    linear systolic stack
//   tc_    tuple comparator with a fixed tuple
//   pm_    string pattern matcher
//   ip_    inner-product array for streamed vector pairs
//   is_    two-dimensional tuple-set intersection array
//   mm_    two-dimensional matrix multiplier
//   td_    tree-machine dictionary with free-register tickets
//   lm_    L-machine dictionary with minimum extraction
//   lh_    L-machine dictionary that also accepts repeated inserts and
//          deletes of absent keys (holes), up to LH_N/2 keys
// Every parameter defaults to the size the corresponding block uses on its
// own; see the individual modules for interface timing.
module systolic_suite
  import systolic_pkg::*;
#(
  parameter int unsigned INV_N     = 5,
  parameter int unsigned INV_WIDTH = 32,
  parameter int unsigned INV_FRAC  = 16,
  parameter int unsigned LIN_N     = 8,
  parameter int unsigned LIN_KW    = 16,
  parameter int unsigned TC_N      = 8,
  parameter int unsigned TC_DW     = 8,
  parameter int unsigned PM_N      = 6,
  parameter int unsigned PM_CW     = 8,
  parameter int unsigned IP_N      = 8,
  parameter int unsigned IP_DW     = 16,
  parameter int unsigned IS_K      = 4,
  parameter int unsigned IS_N      = 4,
  parameter int unsigned IS_DW     = 8,
  parameter int unsigned MM_N      = 4,
  parameter int unsigned MM_DW     = 16,
  parameter int unsigned TD_N      = 8,
  parameter int unsigned TD_KW     = 16,
  parameter int unsigned LM_N      = 8,
  parameter int unsigned LM_KW     = 16,
  parameter int unsigned LH_N      = 8,
  parameter int unsigned LH_KW     = 16
) (
  input  logic clk,
  input  logic rst_n,
  // matrix inverter
  input  logic                        inv_load,
  input  logic signed [INV_WIDTH-1:0] inv_mat_in  [INV_N][INV_N],
  input  logic                        inv_start,
  output logic                        inv_busy,
  output logic                        inv_done,
  output logic signed [INV_WIDTH-1:0] inv_mat_out [INV_N][INV_N],
  // priority queue, queue, stack
  input  logic              pq_cmd_valid, fq_cmd_valid, st_cmd_valid,
  input  lin_cmd_e          pq_cmd, fq_cmd, st_cmd,
  input  logic [LIN_KW-1:0] pq_cmd_key, fq_cmd_key, st_cmd_key,
  output logic              pq_cmd_ready, fq_cmd_ready, st_cmd_ready,
  output logic              pq_out_valid, fq_out_valid, st_out_valid,
  output logic [LIN_KW-1:0] pq_out_key, fq_out_key, st_out_key,
  output logic              pq_out_empty, fq_out_empty, st_out_empty,
  // tuple comparator
  input  logic             tc_load,
  input  logic [TC_DW-1:0] tc_load_tuple [TC_N],
  input  logic [TC_DW-1:0] tc_b_in       [TC_N],
  input  logic             tc_b_valid    [TC_N],
  output logic             tc_match,
  output logic             tc_match_valid,
  // pattern matcher
  input  logic             pm_load,
  input  logic [PM_CW-1:0] pm_load_pattern [PM_N],
  input  logic [PM_CW-1:0] pm_text_in,
  input  logic             pm_text_valid,
  output logic             pm_text_ready,
  output logic             pm_match,
  output logic             pm_match_valid,
  // inner-product array
  input  logic [IP_DW-1:0] ip_a_in    [IP_N],
  input  logic [IP_DW-1:0] ip_b_in    [IP_N],
  input  logic             ip_in_valid [IP_N],
  output logic [2*IP_DW+$clog2(IP_N):0] ip_dot,
  output logic             ip_dot_valid,
  // intersection array
  input  logic             is_start,
  input  logic [IS_DW-1:0] is_set_a [IS_K][IS_N],
  input  logic [IS_DW-1:0] is_set_b [IS_K][IS_N],
  output logic             is_busy,
  output logic             is_done,
  output logic             is_match [IS_K],
  // matrix multiplier
  input  logic             mm_start,
  input  logic [MM_DW-1:0] mm_mat_a [MM_N][MM_N],
  input  logic [MM_DW-1:0] mm_mat_b [MM_N][MM_N],
  output logic             mm_busy,
  output logic             mm_done,
  output logic [2*MM_DW+$clog2(MM_N):0] mm_mat_c [MM_N][MM_N],
  // tree-machine dictionary
  input  logic             td_cmd_valid,
  input  dict_cmd_e        td_cmd,
  input  logic [TD_KW-1:0] td_cmd_key,
  output logic             td_resp_valid,
  output logic             td_resp_hit,
  output logic [$clog2(TD_N+1)-1:0] td_free_count,
  // L-machine
  input  logic             lm_cmd_valid,
  input  dict_cmd_e        lm_cmd,
  input  logic [LM_KW-1:0] lm_cmd_key,
  output logic             lm_xmin_valid,
  output logic [LM_KW-1:0] lm_xmin_key,
  output logic             lm_xmin_empty,
  output logic             lm_resp_valid,
  output logic             lm_resp_hit,
  input  logic             lh_cmd_valid,
  input  dict_cmd_e        lh_cmd,
  input  logic [LH_KW-1:0] lh_cmd_key,
  output logic             lh_cmd_ready,
  output logic             lh_xmin_valid,
  output logic [LH_KW-1:0] lh_xmin_key,
  output logic             lh_xmin_empty,
  output logic             lh_resp_valid,
  output logic             lh_resp_hit
);
  matrix_inverter #(.N(INV_N), .WIDTH(INV_WIDTH), .FRAC(INV_FRAC)) u_inv (
    .clk, .rst_n, .load(inv_load), .mat_in(inv_mat_in), .start(inv_start),
    .busy(inv_busy), .done(inv_done), .mat_out(inv_mat_out));

  systolic_linear_array #(.N(LIN_N), .KW(LIN_KW), .MODE(LIN_PQUEUE)) u_pq (
    .clk, .rst_n, .cmd_valid(pq_cmd_valid), .cmd(pq_cmd), .cmd_key(pq_cmd_key),
    .cmd_ready(pq_cmd_ready), .out_valid(pq_out_valid), .out_key(pq_out_key), .out_empty(pq_out_empty));
  systolic_linear_array #(.N(LIN_N), .KW(LIN_KW), .MODE(LIN_QUEUE)) u_fq (
    .clk, .rst_n, .cmd_valid(fq_cmd_valid), .cmd(fq_cmd), .cmd_key(fq_cmd_key),
    .cmd_ready(fq_cmd_ready), .out_valid(fq_out_valid), .out_key(fq_out_key), .out_empty(fq_out_empty));
  systolic_linear_array #(.N(LIN_N), .KW(LIN_KW), .MODE(LIN_STACK)) u_st (
    .clk, .rst_n, .cmd_valid(st_cmd_valid), .cmd(st_cmd), .cmd_key(st_cmd_key),
    .cmd_ready(st_cmd_ready), .out_valid(st_out_valid), .out_key(st_out_key), .out_empty(st_out_empty));

  tuple_comparator #(.N(TC_N), .DW(TC_DW)) u_tc (
    .clk, .rst_n, .load(tc_load), .load_tuple(tc_load_tuple), .b_in(tc_b_in), .b_valid(tc_b_valid),
    .match(tc_match), .match_valid(tc_match_valid));

  pattern_matcher #(.N(PM_N), .CW(PM_CW)) u_pm (
    .clk, .rst_n, .load(pm_load), .load_pattern(pm_load_pattern), .text_in(pm_text_in),
    .text_valid(pm_text_valid), .text_ready(pm_text_ready), .match(pm_match), .match_valid(pm_match_valid));

  inner_product_array #(.N(IP_N), .DW(IP_DW)) u_ip (
    .clk, .rst_n, .a_in(ip_a_in), .b_in(ip_b_in), .in_valid(ip_in_valid), .dot(ip_dot), .dot_valid(ip_dot_valid));

  intersection_array #(.K(IS_K), .N(IS_N), .DW(IS_DW)) u_is (
    .clk, .rst_n, .start(is_start), .set_a(is_set_a), .set_b(is_set_b),
    .busy(is_busy), .done(is_done), .match(is_match));

  matmul_array #(.N(MM_N), .DW(MM_DW)) u_mm (
    .clk, .rst_n, .start(mm_start), .mat_a(mm_mat_a), .mat_b(mm_mat_b),
    .busy(mm_busy), .done(mm_done), .mat_c(mm_mat_c));

  tree_dictionary #(.N(TD_N), .KW(TD_KW)) u_td (
    .clk, .rst_n, .cmd_valid(td_cmd_valid), .cmd(td_cmd), .cmd_key(td_cmd_key),
    .resp_valid(td_resp_valid), .resp_hit(td_resp_hit), .free_count(td_free_count));

  l_machine #(.N(LM_N), .KW(LM_KW)) u_lm (
    .clk, .rst_n, .cmd_valid(lm_cmd_valid), .cmd(lm_cmd), .cmd_key(lm_cmd_key),
    .xmin_valid(lm_xmin_valid), .xmin_key(lm_xmin_key), .xmin_empty(lm_xmin_empty),
    .resp_valid(lm_resp_valid), .resp_hit(lm_resp_hit));

  l_machine_holes #(.N(LH_N), .KW(LH_KW)) u_lh (
    .clk, .rst_n, .cmd_valid(lh_cmd_valid), .cmd(lh_cmd), .cmd_key(lh_cmd_key), .cmd_ready(lh_cmd_ready),
    .xmin_valid(lh_xmin_valid), .xmin_key(lh_xmin_key), .xmin_empty(lh_xmin_empty),
    .resp_valid(lh_resp_valid), .resp_hit(lh_resp_hit));
endmodule
