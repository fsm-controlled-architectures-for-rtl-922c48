// invasive_top - the two invasive platforms side by side.
//
// Holds the linear invasive processor array (NUM_PE PEs with per-PE invasion
// controllers and a central control manager on a configuration bus, running
// the FIR case study) and, independently, the FPGA control manager that
// applies the same invade / infect / retreat steps to NUM_PR reconfigurable
// regions. The two share only clock and reset; their ports are brought out
// unchanged, the array's with prefix-free names and the FPGA manager's with
// the prefix fpga_. See invasive_wppa_array and pr_control_manager for the
// protocols and timing.
module invasive_top
  import inv_pkg::*;
#(
  parameter int unsigned NUM_PE      = 4,
  parameter int unsigned N_TAPS      = 64,
  parameter int unsigned CNT_W       = 8,
  parameter int unsigned NUM_PR      = 5,
  parameter bit          PARTIAL     = 1'b1,
  parameter int unsigned PR_CNT_W    = 4,
  localparam int unsigned AW         = (N_TAPS > 1) ? $clog2(N_TAPS) : 1,
  localparam int unsigned PW         = (NUM_PE > 1) ? $clog2(NUM_PE) : 1,
  localparam int unsigned RW         = (NUM_PR > 1) ? $clog2(NUM_PR) : 1,
  localparam int unsigned TW         = $clog2(N_TAPS + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // processor array: host side of the control manager
  input  logic                     host_vld,
  output logic                     host_rdy,
  input  logic [1:0]               host_op,
  input  logic [PW-1:0]            host_pe,
  input  logic [AW-1:0]            host_addr,
  input  logic signed [DATA_W-1:0] host_data,
  output logic                     mgr_busy,
  // processor array: per-PE instruction, sample, result and status ports
  input  inv_cmd_t                 cmd        [NUM_PE],
  input  logic [CNT_W-1:0]         cmd_budget [NUM_PE],
  output logic [NUM_PE-1:0]        cmd_busy,
  output logic [NUM_PE-1:0]        cmd_done,
  output logic [CNT_W-1:0]         p_count    [NUM_PE],
  output logic [CNT_W-1:0]         freed_count[NUM_PE],
  input  logic signed [DATA_W-1:0] ext_x      [NUM_PE],
  input  logic [NUM_PE-1:0]        ext_x_vld,
  output logic [NUM_PE-1:0]        ext_x_rdy,
  output logic signed [ACC_W-1:0]  y_out      [NUM_PE],
  output logic [NUM_PE-1:0]        y_vld,
  output inv_state_t               state      [NUM_PE],
  output inv_flag_t                flag       [NUM_PE],
  output logic [TW-1:0]            taps       [NUM_PE],
  // FPGA regions
  input  logic [NUM_PR-1:0]        fpga_start_req,
  input  logic [NUM_PR-1:0]        fpga_invade_req,
  input  logic [PR_CNT_W-1:0]      fpga_invade_count [NUM_PR],
  input  logic [NUM_PR-1:0]        fpga_retreat_req,
  output logic [NUM_PR-1:0]        fpga_done,
  output logic [PR_CNT_W-1:0]      fpga_grant_count,
  output inv_flag_t                fpga_role  [NUM_PR],
  output logic [RW-1:0]            fpga_owner [NUM_PR],
  output logic [NUM_PR-1:0]        fpga_clk_en,
  output logic                     fpga_pr_req,
  output logic                     fpga_pr_erase,
  output logic [RW-1:0]            fpga_pr_region,
  output logic [RW-1:0]            fpga_pr_src_region,
  input  logic                     fpga_pr_done
);

  invasive_wppa_array #(.NUM_PE(NUM_PE), .N_TAPS(N_TAPS), .CNT_W(CNT_W)) u_array (
    .clk, .rst_n,
    .host_vld, .host_rdy, .host_op, .host_pe, .host_addr, .host_data, .mgr_busy,
    .cmd, .cmd_budget, .cmd_busy, .cmd_done, .p_count, .freed_count,
    .ext_x, .ext_x_vld, .ext_x_rdy, .y_out, .y_vld,
    .state, .flag, .taps
  );

  pr_control_manager #(.NUM_PR(NUM_PR), .PARTIAL(PARTIAL), .CNT_W(PR_CNT_W)) u_fpga (
    .clk, .rst_n,
    .start_req    (fpga_start_req),
    .invade_req   (fpga_invade_req),
    .invade_count (fpga_invade_count),
    .retreat_req  (fpga_retreat_req),
    .done         (fpga_done),
    .grant_count  (fpga_grant_count),
    .role         (fpga_role),
    .owner        (fpga_owner),
    .clk_en       (fpga_clk_en),
    .pr_req       (fpga_pr_req),
    .pr_erase     (fpga_pr_erase),
    .pr_region    (fpga_pr_region),
    .pr_src_region(fpga_pr_src_region),
    .pr_done      (fpga_pr_done)
  );

endmodule
