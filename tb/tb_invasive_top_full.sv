// tb_invasive_top_full - one complete invasion cycle at the default sizes.
//
// Four PEs and a 64-tap filter. PE 0 and PE 3 are started as masters; PE 0
// invades all and is stopped by PE 3 (P = 2, 2P+2 = 6 clocks); it infects
// PEs 1 and 2, which the manager loads and starts as slaves. The three PEs
// share the 64 taps, ceil(64/3) = 22 each, and the region takes one sample
// every 22 clocks; y leaves PE 2 and is checked against a reference. Before
// the invasion PE 0 filters alone, one sample every 64 clocks. PE 0 then
// retreats. The FPGA manager
// places a master in region 0, invades two regions and retreats.
module tb_invasive_top_full;
  import inv_pkg::*;
  localparam int NUM_PE = 4, N_TAPS = 64, CNT_W = 8;
  localparam int NUM_PR = 5, PR_CNT_W = 4, RW = 3;
  localparam int AW = 6, PW = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic host_vld, host_rdy, mgr_busy;
  logic [1:0] host_op;
  logic [PW-1:0] host_pe;
  logic [AW-1:0] host_addr;
  logic signed [DATA_W-1:0] host_data;
  inv_cmd_t cmd [NUM_PE];
  logic [CNT_W-1:0] cmd_budget [NUM_PE], p_count [NUM_PE], freed_count [NUM_PE];
  logic [NUM_PE-1:0] cmd_busy, cmd_done, ext_x_vld, ext_x_rdy, y_vld;
  logic [6:0] taps [NUM_PE];
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
  int checks = 0, failures = 0, cyc = 0;
  logic signed [DATA_W-1:0] coefs [N_TAPS];

  invasive_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // behavioural reconfiguration port: answers three clocks after a request
  int pr_wait = 0;
  always @(posedge clk) begin
    fpga_pr_done <= 1'b0;
    if (fpga_pr_req && !fpga_pr_done) begin
      pr_wait <= (pr_wait == 3) ? 0 : pr_wait + 1;
      if (pr_wait == 3) fpga_pr_done <= 1'b1;
    end
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic host_cmd(input logic [1:0] op, input int pe, input int addr, input int data);
    @(negedge clk);
    host_vld = 1; host_op = op; host_pe = PW'(pe); host_addr = AW'(addr); host_data = DATA_W'(data);
    while (!host_rdy) @(negedge clk);
    @(posedge clk); #1;
    host_vld = 0;
  endtask

  task automatic master_cmd(input int pe, input inv_cmd_t c, output int clocks);
    int t0;
    @(negedge clk);
    cmd[pe] = c; cmd_budget[pe] = '0;
    @(posedge clk); #1;
    t0 = cyc;
    cmd[pe] = CMD_NONE;
    clocks = 0;
    if (c != CMD_INFECT) begin
      while (!cmd_done[pe]) begin
        @(posedge clk); #1;
      end
      clocks = cyc - t0;
    end
  endtask

  task automatic fpga_request(int kind, int r, int count);
    @(negedge clk);
    fpga_invade_count[r] = PR_CNT_W'(count);
    if (kind == 0) fpga_start_req[r] = 1'b1;
    if (kind == 1) fpga_invade_req[r] = 1'b1;
    if (kind == 2) fpga_retreat_req[r] = 1'b1;
    while (!fpga_done[r]) @(negedge clk);
    fpga_start_req[r] = 1'b0; fpga_invade_req[r] = 1'b0; fpga_retreat_req[r] = 1'b0;
  endtask

  // stream ns samples into PE 0 as fast as it takes them; check each y at
  // PE y_pe and the spacing of the outputs
  task automatic run_filter(int y_pe, int ns, int interval, output int dummy);
    logic signed [DATA_W-1:0] h [N_TAPS];
    longint e [16];
    int n_seen = 0, t_prev = -1;
    dummy = 0;
    for (int k = 0; k < N_TAPS; k++) h[k] = '0;
    fork
      begin
        for (int i = 0; i < ns; i++) begin
          @(negedge clk);
          ext_x[0] = DATA_W'($urandom_range(0, 65535)); ext_x_vld[0] = 1'b1;
          while (!ext_x_rdy[0]) @(negedge clk);
          for (int k = N_TAPS - 1; k > 0; k--) h[k] = h[k-1];
          h[0] = ext_x[0];
          e[i] = 0;
          for (int k = 0; k < N_TAPS; k++) e[i] += longint'(coefs[k]) * longint'(h[k]);
          @(posedge clk); #1;           // sample taken at this edge
          ext_x_vld[0] = 1'b0;
        end
      end
      repeat (ns * interval + N_TAPS + 20) begin
        @(posedge clk); #1;
        if (y_vld[y_pe]) begin
          check($sformatf("y[%0d] at PE %0d", n_seen, y_pe),
                n_seen < ns && longint'(y_out[y_pe]) == e[n_seen]);
          if (t_prev >= 0)
            check($sformatf("one output per %0d clocks (%0d)", interval, cyc - t_prev),
                  cyc - t_prev == interval);
          t_prev = cyc;
          n_seen++;
        end
      end
    join
    check($sformatf("%0d outputs at PE %0d (%0d)", ns, y_pe, n_seen), n_seen == ns);
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int clocks;
    host_vld = 0; host_op = 0; host_pe = 0; host_addr = 0; host_data = 0;
    for (int i = 0; i < NUM_PE; i++) begin
      cmd[i] = CMD_NONE; cmd_budget[i] = '0; ext_x[i] = '0;
    end
    ext_x_vld = '0;
    fpga_start_req = '0; fpga_invade_req = '0; fpga_retreat_req = '0;
    for (int r = 0; r < NUM_PR; r++) fpga_invade_count[r] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int k = 0; k < N_TAPS; k++) begin
      coefs[k] = DATA_W'($urandom_range(0, 4000)) - DATA_W'(2000);
      host_cmd(2'd2, 0, k, int'(coefs[k]));
      host_cmd(2'd3, 0, k, int'(coefs[k]));
    end
    host_cmd(2'd0, 0, 0, 0);
    host_cmd(2'd0, 3, 0, 0);
    @(posedge clk); #1;
    check("masters", state[0] == S_MASTER_EXE && state[3] == S_MASTER_EXE);

    check("master alone runs all 64 taps", taps[0] == 7'(N_TAPS));
    run_filter(0, 4, N_TAPS, clocks);

    master_cmd(0, CMD_INVADE, clocks);
    check($sformatf("invade: P = 2 in 6 clocks (P=%0d, %0d clocks)", p_count[0], clocks),
          p_count[0] == 2 && clocks == 6);
    master_cmd(0, CMD_INFECT, clocks);
    repeat (3) @(posedge clk);
    @(negedge clk);
    while (mgr_busy) @(negedge clk);
    @(posedge clk); #1;
    check("slaves running", state[1] == S_SLAVE_EXE && state[2] == S_SLAVE_EXE && flag[1] == FLAG_SLAVE);
    check("three PEs with 22 taps each", taps[0] == 7'd22 && taps[1] == 7'd22 && taps[2] == 7'd22);
    run_filter(2, 12, 22, clocks);

    master_cmd(0, CMD_RETREAT, clocks);
    check("retreat frees 2 in 6 clocks", freed_count[0] == 2 && clocks == 6 &&
          state[1] == S_IDLE && state[2] == S_IDLE);

    fpga_request(0, 0, 0);
    fpga_request(1, 0, 2);
    check("FPGA invade", fpga_grant_count == 2 && fpga_role[1] == FLAG_SLAVE && fpga_role[2] == FLAG_SLAVE);
    fpga_request(2, 0, 0);
    check("FPGA retreat", fpga_role[1] == FLAG_FREE && fpga_role[2] == FLAG_FREE);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
