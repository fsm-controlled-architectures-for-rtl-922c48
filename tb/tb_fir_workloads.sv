// tb_fir_workloads - the 64-tap FIR filter at the region sizes of the
// throughput figures: 64 PEs (one output per clock) and 32 PEs (one output
// every two clocks).
//
// The array is enlarged to 64 PEs; the filter keeps its default 64 taps.
// PE 0 is started as master and loaded with a[0..63]. It invades the whole
// array (P = 63, 2P + 2 = 128 clocks), infects, and the region of 64 runs one
// tap per PE: samples go in back to back, y leaves PE 63 one per clock,
// 63 clocks after the sample was taken (P + T - 1). After a retreat that
// frees 63 PEs in 128 clocks, PE 0 invades with a budget of 31 (2P = 62
// clocks), infects, and the region of 32 runs two taps per PE: y leaves
// PE 31 every two clocks, 32 clocks after the sample was taken. Every y is
// checked against a direct evaluation of the convolution.
module tb_fir_workloads;
  import inv_pkg::*;
  localparam int NUM_PE = 64, N_TAPS = 64, CNT_W = 8;
  localparam int AW = $clog2(N_TAPS), PW = $clog2(NUM_PE), TW = $clog2(N_TAPS + 1);
  localparam int NS = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  logic host_vld, host_rdy, mgr_busy;
  logic [1:0] host_op;
  logic [PW-1:0] host_pe;
  logic [AW-1:0] host_addr;
  logic signed [DATA_W-1:0] host_data;
  inv_cmd_t cmd [NUM_PE];
  logic [CNT_W-1:0] cmd_budget [NUM_PE], p_count [NUM_PE], freed_count [NUM_PE];
  logic [NUM_PE-1:0] cmd_busy, cmd_done, ext_x_vld, ext_x_rdy, y_vld;
  logic [TW-1:0] taps [NUM_PE];
  logic signed [DATA_W-1:0] ext_x [NUM_PE];
  logic signed [ACC_W-1:0] y_out [NUM_PE];
  inv_state_t state [NUM_PE];
  inv_flag_t flag [NUM_PE];
  int checks = 0, failures = 0, cyc = 0;
  logic signed [DATA_W-1:0] coefs [N_TAPS];

  invasive_wppa_array #(.NUM_PE(NUM_PE), .N_TAPS(N_TAPS), .CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

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

  // issue a command on PE 0; for invade and retreat, return the clocks from
  // the issuing edge to cmd_done
  task automatic master_cmd(input inv_cmd_t c, input int budget, output int clocks);
    int t0;
    @(negedge clk);
    cmd[0] = c; cmd_budget[0] = CNT_W'(budget);
    @(posedge clk); #1;
    t0 = cyc;
    cmd[0] = CMD_NONE;
    clocks = 0;
    if (c != CMD_INFECT) begin
      while (!cmd_done[0]) begin
        @(posedge clk); #1;
      end
      clocks = cyc - t0;
    end
  endtask

  task automatic infect_and_wait();
    int clocks;
    master_cmd(CMD_INFECT, 0, clocks);
    repeat (3) @(posedge clk);
    @(negedge clk);
    while (mgr_busy || !host_rdy) @(negedge clk);
    @(posedge clk); #1;
  endtask

  // stream NS samples into PE 0 as fast as it takes them; check each y at
  // PE p (the region's last PE), the output spacing t and the latency p+t-1
  task automatic run_region(int p);
    int t = (N_TAPS + p) / (p + 1);
    logic signed [DATA_W-1:0] u [NS];
    int t_take [NS];
    int n_in = 0, n_out = 0, t_prev = -1;
    fork
      begin
        while (n_in < NS) begin
          @(negedge clk);
          ext_x[0] = DATA_W'($urandom_range(0, 65535)); ext_x_vld[0] = 1'b1;
          while (!ext_x_rdy[0]) @(negedge clk);
          u[n_in] = ext_x[0];
          @(posedge clk); #1;          // sample taken at this edge
          t_take[n_in] = cyc;
          n_in++;
          ext_x_vld[0] = 1'b0;
        end
      end
      begin
        repeat (NS * (t + 1) + NUM_PE + 8) begin
          @(posedge clk); #1;
          if (y_vld[p]) begin
            longint e = 0;
            for (int k = 0; k < N_TAPS; k++)
              if (n_out - k >= 0) e += longint'(coefs[k]) * longint'(u[n_out - k]);
            check($sformatf("%0d PEs: y[%0d]", p + 1, n_out),
                  n_out < n_in && longint'(y_out[p]) == e);
            check($sformatf("%0d PEs: latency of y[%0d] is %0d clocks (%0d)", p + 1, n_out, p + t - 1,
                            cyc - t_take[n_out]), n_out < n_in && cyc - t_take[n_out] == p + t - 1);
            if (t_prev >= 0)
              check($sformatf("%0d PEs: one output per %0d clocks (%0d)", p + 1, t, cyc - t_prev),
                    cyc - t_prev == t);
            t_prev = cyc;
            n_out++;
          end
        end
      end
    join
    check($sformatf("%0d PEs: %0d outputs (%0d)", p + 1, NS, n_out), n_out == NS);
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int k = 0; k < N_TAPS; k++) begin
      coefs[k] = DATA_W'($urandom_range(0, 4000)) - DATA_W'(2000);
      host_cmd(2'd2, 0, k, int'(coefs[k]));
      host_cmd(2'd3, 0, k, int'(coefs[k]));
    end
    host_cmd(2'd0, 0, 0, 0);
    @(posedge clk); #1;
    check("PE 0 is master", state[0] == S_MASTER_EXE);

    // P + 1 = N = 64: one tap per PE
    master_cmd(CMD_INVADE, 0, clocks);
    check($sformatf("invade all: P = 63 in 128 clocks (P=%0d, %0d clocks)", p_count[0], clocks),
          p_count[0] == 63 && clocks == 128);
    infect_and_wait();
    check("64 slaves and master, one tap each",
          state[63] == S_SLAVE_EXE && taps[0] == TW'(1) && taps[63] == TW'(1));
    run_region(63);
    master_cmd(CMD_RETREAT, 0, clocks);
    check($sformatf("retreat frees 63 in 128 clocks (%0d, %0d clocks)", freed_count[0], clocks),
          freed_count[0] == 63 && clocks == 128 && state[1] == S_IDLE && state[63] == S_IDLE);
    @(posedge clk); #1;                // T follows one clock after cmd_done
    check("master back to all 64 taps", taps[0] == TW'(N_TAPS));

    // P + 1 = N/2 = 32: two taps per PE
    master_cmd(CMD_INVADE, 31, clocks);
    check($sformatf("invade with budget 31: P = 31 in 62 clocks (P=%0d, %0d clocks)", p_count[0], clocks),
          p_count[0] == 31 && clocks == 62);
    infect_and_wait();
    check("32-PE region, two taps each",
          state[31] == S_SLAVE_EXE && state[32] == S_IDLE && taps[0] == TW'(2) && taps[31] == TW'(2));
    run_region(31);
    master_cmd(CMD_RETREAT, 0, clocks);
    check($sformatf("retreat frees 31 (%0d)", freed_count[0]), freed_count[0] == 31 && state[31] == S_IDLE);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
