// tb_invasive_pe - self-checking test of one processing element.
//
// The PE's neighbours and configuration bus are driven directly. Part 1: the
// PE is loaded with N = 4 coefficients and started as master; with no region
// it runs the whole filter alone (checked against a reference, one sample per
// N clocks). It then invades, receives a count that makes P = 1, infects,
// and runs its share of T = 2 taps (a[0]*u[s] + a[1]*u[s-1], one sample per
// 2 clocks); after retreat it runs all taps again. Part 2: the PE is
// invaded, infected, loaded with two coefficients and T = 2, and started as
// a slave; its partial-sum and sample outputs are checked clock by clock.
module tb_invasive_pe;
  import inv_pkg::*;
  localparam int N = 4, CNT_W = 8, AW = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, stop, infect_in, infect_out, cfg_we;
  logic [CNT_W-1:0] infect_p;
  logic [AW-1:0] cfg_addr;
  logic signed [DATA_W-1:0] cfg_data;
  logic invade_in, retreat_in, ack_out, invade_out, retreat_out, ack_in;
  logic [CNT_W-1:0] budget_in, pe_out, budget_out, pe_in, cmd_budget, p_count, freed_count;
  logic signed [DATA_W-1:0] x_in, x_out, ext_x;
  logic x_in_vld, x_out_vld, ext_x_vld, ext_x_rdy, s_in_vld, s_out_vld, y_vld;
  logic signed [ACC_W-1:0] s_in, s_out, y_out;
  inv_cmd_t cmd;
  logic cmd_busy, cmd_done, cfg_taps_we;
  logic [2:0] taps;
  inv_state_t state;
  inv_flag_t flag;
  int checks = 0, failures = 0;
  logic signed [DATA_W-1:0] a [N];

  invasive_pe #(.N_TAPS(N), .CNT_W(CNT_W)) dut (.*);

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
      $display("FAIL %s (state=%s y=%0d vld=%0b s_out=%0d)", what, state.name(), y_out, y_vld, s_out);
    end
  endtask

  task automatic quiet();
    start = 0; stop = 0; infect_in = 0; cfg_we = 0; cfg_taps_we = 0; cfg_addr = 0; cfg_data = 0;
    invade_in = 0; retreat_in = 0; ack_in = 0; budget_in = 0; pe_in = 0;
    x_in = 0; x_in_vld = 0; s_in = 0; s_in_vld = 0; ext_x = 0; ext_x_vld = 0;
    cmd = CMD_NONE; cmd_budget = 0;
  endtask

  task automatic step();
    @(posedge clk); #1;
    quiet();
  endtask

  logic signed [DATA_W-1:0] hist [N];
  longint exp_y;

  initial begin
    quiet();
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // ---- part 1: master
    for (int k = 0; k < N; k++) begin
      a[k] = DATA_W'($urandom_range(1, 20000)) - DATA_W'(10000);
      cfg_we = 1; cfg_addr = AW'(k); cfg_data = a[k]; step();
    end
    start = 1; step();
    check("master alone runs all taps", state == S_MASTER_EXE && flag == FLAG_MASTER && taps == N);
    for (int k = 0; k < N; k++) hist[k] = '0;
    for (int i = 0; i < 12; i++) begin
      int wait_clk;
      wait_clk = 0;
      ext_x = DATA_W'($urandom_range(0, 65535));
      ext_x_vld = 1;
      while (!ext_x_rdy) begin
        @(posedge clk); #1; wait_clk++;
      end
      for (int k = N - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = ext_x;
      exp_y = 0;
      for (int k = 0; k < N; k++) exp_y += longint'(a[k]) * longint'(hist[k]);
      @(posedge clk); #1;             // sample taken at this edge
      ext_x_vld = 0;
      for (int k = 1; k < N; k++) begin
        check("not ready while summing", !ext_x_rdy);
        @(posedge clk); #1;
        if (k < N - 1) check("no result while summing", !y_vld);
      end
      // N edges after the sample was taken: result out, next sample welcome
      check("sequential result", y_vld && longint'(y_out) == exp_y);
      check($sformatf("ready again after N clocks (rdy=%0b waited=%0d)", ext_x_rdy, wait_clk), ext_x_rdy && (wait_clk == 0 || i == 0));
    end
    quiet();
    // invade: boundary answers with 2, so P = 1
    cmd = CMD_INVADE; step();
    check("invade_out from master", invade_out && cmd_busy);
    ack_in = 1; pe_in = 2; step();
    check("P = 1, still alone until infect", p_count == 1 && taps == N);
    cmd = CMD_INFECT; step();
    check("infect_out with P", infect_out && infect_p == 1);
    step();
    check("share of the taps: T = 2", taps == 2 && !ext_x_rdy);
    step();                           // one clock to restart the unit
    // one sample every 2 clocks; out1 = a[0]*u[s] + a[1]*u[s-1]
    begin
      logic signed [DATA_W-1:0] u [8];
      for (int i = 0; i < 8; i++) begin
        u[i] = DATA_W'($urandom_range(0, 65535));
        ext_x = u[i]; ext_x_vld = 1;
        check("ready for a sample", ext_x_rdy);
        @(posedge clk); #1;
        ext_x_vld = 0;
        check("sample passed on after T samples", x_out_vld && x_out == ((i >= 2) ? u[i-2] : '0));
        check("busy for the second tap", !ext_x_rdy && !y_vld);
        @(posedge clk); #1;
        check("master share of the region sum", y_vld &&
              longint'(y_out) == longint'(a[0]) * longint'(u[i]) +
                                 ((i >= 1) ? longint'(a[1]) * longint'(u[i-1]) : 0));
      end
    end
    quiet();
    cmd = CMD_RETREAT; step();
    check("retreat_out from master", retreat_out);
    ack_in = 1; pe_in = 2; step();
    check("retreat done", freed_count == 1);
    step();
    check("alone again: all taps", taps == N);
    stop = 1; step();
    check("stopped", state == S_IDLE);

    // ---- part 2: slave
    invade_in = 1; step();
    check("invaded", state == S_INVADED && invade_out);
    ack_in = 1; pe_in = 1; step();
    check("count passed on", ack_out && pe_out == 2);
    infect_in = 1; step();
    cfg_we = 1; cfg_addr = 0; cfg_data = 16'sd7; step();
    cfg_we = 1; cfg_addr = 1; cfg_data = -16'sd3; step();
    cfg_taps_we = 1; cfg_data = 16'sd2; step();
    start = 1; step();
    check("slave with T = 2", state == S_SLAVE_EXE && flag == FLAG_SLAVE && taps == 2);
    begin
      logic signed [DATA_W-1:0] xs [10];
      logic signed [ACC_W-1:0]  ss [10];
      for (int i = 0; i < 10; i++) begin
        xs[i] = DATA_W'($urandom_range(0, 65535));
        ss[i] = ACC_W'($urandom_range(0, 100000));
        x_in = xs[i]; x_in_vld = 1;
        @(posedge clk); #1;
        x_in_vld = 0;
        check("slave sample passed on after 2", x_out_vld && x_out == ((i >= 2) ? xs[i-2] : '0));
        s_in = ss[i]; s_in_vld = 1;        // left sum arrives one clock later
        @(posedge clk); #1;
        s_in_vld = 0;
        check("slave partial sum", s_out_vld && longint'(s_out) == longint'(ss[i]) +
              7 * longint'(xs[i]) - 3 * ((i >= 1) ? longint'(xs[i-1]) : 0));
      end
    end
    quiet();
    retreat_in = 1; step();
    check("slave retreat", state == S_IDLE && retreat_out);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
