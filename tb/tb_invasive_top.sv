// tb_invasive_top - end-to-end test of both invasive platforms.
//
// The processor array runs with six PEs and a 4-tap filter (shared scenario,
// see wppa_scenario.svh). At the same time the FPGA region manager goes
// through the three invasion steps on five regions with a behavioural model
// of the reconfiguration port: masters in regions 0 and 3, region 0 invades
// and gets regions 1 and 2 (loaded as copies of its module), then retreats
// (regions erased). Each mechanism of both platforms is counted and must
// occur at least once.
module tb_invasive_top;
  import inv_pkg::*;
  localparam int NUM_PE = 6, N_TAPS = 4, CNT_W = 8;
  localparam int NUM_PR = 5, PR_CNT_W = 4, RW = 3, PR_LAT = 5;
  localparam int AW = $clog2(N_TAPS), PW = $clog2(NUM_PE);

  logic clk = 1'b0, rst_n = 1'b0;
  logic host_vld, host_rdy, mgr_busy;
  logic [1:0] host_op;
  logic [PW-1:0] host_pe;
  logic [AW-1:0] host_addr;
  logic signed [DATA_W-1:0] host_data;
  inv_cmd_t cmd [NUM_PE];
  logic [CNT_W-1:0] cmd_budget [NUM_PE], p_count [NUM_PE], freed_count [NUM_PE];
  logic [NUM_PE-1:0] cmd_busy, cmd_done, ext_x_vld, ext_x_rdy, y_vld;
  logic [2:0] taps [NUM_PE];
  logic signed [DATA_W-1:0] ext_x [NUM_PE];
  logic signed [ACC_W-1:0] y_out [NUM_PE];
  inv_state_t state [NUM_PE];
  inv_flag_t flag [NUM_PE];
  logic [NUM_PR-1:0] fpga_start_req, fpga_invade_req, fpga_retreat_req, fpga_done, fpga_clk_en;
  logic [PR_CNT_W-1:0] fpga_invade_count [NUM_PR];
  logic [PR_CNT_W-1:0] fpga_grant_count;
  inv_flag_t fpga_role [NUM_PR];
  logic [RW-1:0] fpga_owner [NUM_PR];
  logic fpga_pr_req, fpga_pr_erase, fpga_pr_done;
  logic [RW-1:0] fpga_pr_region, fpga_pr_src_region;
  int checks = 0, failures = 0;
  int fpga_loads = 0, fpga_erases = 0, fpga_claims = 0;

  invasive_top #(.NUM_PE(NUM_PE), .N_TAPS(N_TAPS), .CNT_W(CNT_W),
                 .NUM_PR(NUM_PR), .PARTIAL(1'b1), .PR_CNT_W(PR_CNT_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  `include "wppa_scenario.svh"

  // behavioural reconfiguration port
  int pr_wait = 0;
  always @(posedge clk) begin
    fpga_pr_done <= 1'b0;
    if (fpga_pr_req && !fpga_pr_done) begin
      if (pr_wait == PR_LAT) begin
        fpga_pr_done <= 1'b1;
        pr_wait <= 0;
        if (fpga_pr_erase) fpga_erases++;
        else fpga_loads++;
      end else begin
        pr_wait <= pr_wait + 1;
      end
    end
  end

  task automatic fpga_request(int kind, int r, int count);
    @(negedge clk);
    fpga_invade_count[r] = PR_CNT_W'(count);
    if (kind == 0) fpga_start_req[r] = 1'b1;
    if (kind == 1) fpga_invade_req[r] = 1'b1;
    if (kind == 2) fpga_retreat_req[r] = 1'b1;
    while (!fpga_done[r]) @(negedge clk);
    fpga_start_req[r] = 1'b0; fpga_invade_req[r] = 1'b0; fpga_retreat_req[r] = 1'b0;
  endtask

  task automatic fpga_run();
    fpga_request(0, 0, 0);
    fpga_request(0, 3, 0);
    check("FPGA masters", fpga_role[0] == FLAG_MASTER && fpga_role[3] == FLAG_MASTER && fpga_loads == 2);
    fpga_request(1, 0, 2);
    check("FPGA invade: PR2 and PR3 slaves", fpga_grant_count == 2 &&
          fpga_role[1] == FLAG_SLAVE && fpga_role[2] == FLAG_SLAVE && fpga_clk_en[2:1] == 2'b11);
    fpga_claims += int'(fpga_grant_count);
    check("FPGA infect: two loads", fpga_loads == 4);
    fpga_request(2, 0, 0);
    check("FPGA retreat: regions free, erased", fpga_role[1] == FLAG_FREE &&
          fpga_role[2] == FLAG_FREE && fpga_erases == 2 && fpga_clk_en[2:1] == 2'b00);
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    quiet_all();
    fpga_start_req = '0; fpga_invade_req = '0; fpga_retreat_req = '0;
    for (int r = 0; r < NUM_PR; r++) fpga_invade_count[r] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    fork
      wppa_run();
      fpga_run();
    join
    wppa_report();
    $display("mechanism FPGA_CLAIM happened %0d times", fpga_claims);
    $display("mechanism FPGA_PR_LOAD happened %0d times", fpga_loads);
    $display("mechanism FPGA_PR_ERASE happened %0d times", fpga_erases);
    check("FPGA mechanisms happened", fpga_claims > 0 && fpga_loads > 0 && fpga_erases > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
