// tb_pr_control_manager - self-checking test of the FPGA region manager.
//
// Runs the three steps of an FPGA invasion on two managers at once, one for a
// partially reconfigurable device (with a behavioural model of the
// reconfiguration port that answers after a fixed delay) and one for a device
// whose modules are fixed and only clocked. Masters are placed in regions 0
// and 3; the master in region 0 asks for three modules and must get the two
// free regions 1 and 2 only; it then retreats. Checks roles, owners, clock
// enables, the exact load and erase requests, and the granted counts.
module tb_pr_control_manager;
  import inv_pkg::*;
  localparam int NUM_PR = 5, CNT_W = 4, RW = 3, PR_LAT = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  // requests: same pattern for both managers, each dropped on its own done
  logic [NUM_PR-1:0] s_req [2], i_req [2], r_req [2], done [2], clk_en [2];
  logic [CNT_W-1:0]  cnt [NUM_PR];
  logic [CNT_W-1:0]  grant [2];
  inv_flag_t         role [2][NUM_PR];
  logic [RW-1:0]     owner [2][NUM_PR];
  logic              pr_req [2], pr_erase [2], pr_done [2];
  logic [RW-1:0]     pr_region [2], pr_src [2];

  pr_control_manager #(.NUM_PR(NUM_PR), .PARTIAL(1'b1), .CNT_W(CNT_W)) dut_pr (
    .clk, .rst_n, .start_req(s_req[0]), .invade_req(i_req[0]), .invade_count(cnt),
    .retreat_req(r_req[0]), .done(done[0]), .grant_count(grant[0]), .role(role[0]),
    .owner(owner[0]), .clk_en(clk_en[0]), .pr_req(pr_req[0]), .pr_erase(pr_erase[0]),
    .pr_region(pr_region[0]), .pr_src_region(pr_src[0]), .pr_done(pr_done[0]));

  pr_control_manager #(.NUM_PR(NUM_PR), .PARTIAL(1'b0), .CNT_W(CNT_W)) dut_ck (
    .clk, .rst_n, .start_req(s_req[1]), .invade_req(i_req[1]), .invade_count(cnt),
    .retreat_req(r_req[1]), .done(done[1]), .grant_count(grant[1]), .role(role[1]),
    .owner(owner[1]), .clk_en(clk_en[1]), .pr_req(pr_req[1]), .pr_erase(pr_erase[1]),
    .pr_region(pr_region[1]), .pr_src_region(pr_src[1]), .pr_done(pr_done[1]));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // behavioural reconfiguration port: done PR_LAT clocks after a request;
  // logs every operation as {erase, region, source}
  int n_ops = 0;
  logic [6:0] ops [32];
  int wait_cnt = 0;
  always @(posedge clk) begin
    pr_done[0] <= 1'b0;
    pr_done[1] <= 1'b0;
    if (pr_req[0] && !pr_done[0]) begin
      if (wait_cnt == PR_LAT) begin
        pr_done[0] <= 1'b1;
        wait_cnt   <= 0;
        ops[n_ops] <= {pr_erase[0], pr_region[0], pr_src[0]};
        n_ops      <= n_ops + 1;
      end else begin
        wait_cnt <= wait_cnt + 1;
      end
    end
    check("clock-only manager never uses the port", !pr_req[1]);
  end

  // drop each manager's request on its done pulse
  for (genvar d = 0; d < 2; d++) begin : g_drop
    always @(posedge clk) begin
      for (int r = 0; r < NUM_PR; r++) begin
        if (done[d][r]) begin
          s_req[d][r] <= 1'b0;
          i_req[d][r] <= 1'b0;
          r_req[d][r] <= 1'b0;
        end
      end
    end
  end

  task automatic request(int kind, int r, int count);
    @(negedge clk);
    cnt[r] = CNT_W'(count);
    for (int d = 0; d < 2; d++) begin
      if (kind == 0) s_req[d][r] = 1'b1;
      if (kind == 1) i_req[d][r] = 1'b1;
      if (kind == 2) r_req[d][r] = 1'b1;
    end
    while (s_req[0][r] || i_req[0][r] || r_req[0][r] ||
           s_req[1][r] || i_req[1][r] || r_req[1][r]) @(negedge clk);
  endtask

  task automatic expect_roles(string what, inv_flag_t e0, inv_flag_t e1, inv_flag_t e2,
                              inv_flag_t e3, inv_flag_t e4);
    inv_flag_t e [NUM_PR];
    e = '{e0, e1, e2, e3, e4};
    for (int d = 0; d < 2; d++)
      for (int r = 0; r < NUM_PR; r++) begin
        check($sformatf("%s: manager %0d region %0d role", what, d, r), role[d][r] == e[r]);
        check($sformatf("%s: manager %0d region %0d clock", what, d, r),
              clk_en[d][r] == (e[r] != FLAG_FREE));
      end
  endtask

  initial begin
    for (int d = 0; d < 2; d++) begin
      s_req[d] = '0; i_req[d] = '0; r_req[d] = '0;
    end
    for (int r = 0; r < NUM_PR; r++) cnt[r] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // Fig. 5(a): masters in PR1 and PR4 (regions 0 and 3)
    request(0, 0, 0);
    request(0, 3, 0);
    expect_roles("two masters", FLAG_MASTER, FLAG_FREE, FLAG_FREE, FLAG_MASTER, FLAG_FREE);
    check("two master loads", n_ops == 2 && ops[0] == {1'b0, 3'd0, 3'd0} && ops[1] == {1'b0, 3'd3, 3'd3});

    // Fig. 5(b): master in region 0 asks for three, gets regions 1 and 2
    request(1, 0, 3);
    expect_roles("invaded", FLAG_MASTER, FLAG_SLAVE, FLAG_SLAVE, FLAG_MASTER, FLAG_FREE);
    check("granted 2 (partial)", grant[0] == 2);
    check("granted 2 (clock)", grant[1] == 2);
    check("owners", owner[0][1] == 0 && owner[0][2] == 0 && owner[1][1] == 0 && owner[1][2] == 0);
    check("slave loads copy the master's module",
          n_ops == 4 && ops[2] == {1'b0, 3'd1, 3'd0} && ops[3] == {1'b0, 3'd2, 3'd0});

    // a second invader finds only region 4
    request(1, 3, 5);
    check("region 3 granted 1", grant[0] == 1 && grant[1] == 1);
    expect_roles("both invaded", FLAG_MASTER, FLAG_SLAVE, FLAG_SLAVE, FLAG_MASTER, FLAG_SLAVE);

    // Fig. 5(c): master in region 0 retreats; region 4 stays with master 3
    request(2, 0, 0);
    expect_roles("retreated", FLAG_MASTER, FLAG_FREE, FLAG_FREE, FLAG_MASTER, FLAG_SLAVE);
    check("erase of regions 1 and 2", n_ops == 7 &&
          ops[5] == {1'b1, 3'd1, 3'd0} && ops[6] == {1'b1, 3'd2, 3'd0});

    // invade with a count of 1 takes exactly one region
    request(1, 0, 1);
    check("count 1 granted 1", grant[0] == 1 && grant[1] == 1);
    expect_roles("limited", FLAG_MASTER, FLAG_SLAVE, FLAG_FREE, FLAG_MASTER, FLAG_SLAVE);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
