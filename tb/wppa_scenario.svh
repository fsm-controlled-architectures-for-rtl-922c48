// wppa_scenario.svh - end-to-end scenario for the invasive processor array,
// shared by the array and top-level testbenches. The including module
// declares the array's port signals under their port names, the parameters
// NUM_PE (>= 6) and N_TAPS (>= 2), CNT_W, AW, PW, and check(), and provides
// `clk`. Masters are placed in PE 0 and PE 4 as in the four-PE example
// (PE1 and PE4 there). Every mechanism is counted in mech[].
//
// Steps: load coefficients; start masters 0 and 4; PE 0 invades all and is
// stopped by master 4 (P = 3, 2P+2 clocks); PE 4 invades all and reaches the
// array end; PE 4 runs all taps alone (input stalls); PE 0 infects its
// region of four, which then filters with ceil(N/4) taps per PE (one sample
// per clock for N = 4), checked against a reference; both retreat; PE 0
// invades with a budget of 2, infects, and its region of three shares the
// taps (ceil(N/3) each, one output per that many clocks); an invaded PE is
// stopped by the manager.

typedef enum int {
  MECH_INVADE_TO_MASTER, MECH_INVADE_TO_END, MECH_INVADE_BUDGET, MECH_INFECT,
  MECH_SLAVE_START, MECH_PARALLEL_OUT, MECH_SEQ_OUT, MECH_SEQ_STALL,
  MECH_RETREAT, MECH_RETREAT_VIA_IDLE, MECH_STOP_INVADED, MECH_SPLIT_TAPS_OUT, MECH_NUM
} mech_t;
int mech [MECH_NUM];
logic signed [DATA_W-1:0] coefs [N_TAPS];
int cyc = 0;

always @(posedge clk) cyc <= cyc + 1;

task automatic quiet_all();
  host_vld = 0; host_op = 0; host_pe = 0; host_addr = 0; host_data = 0;
  for (int i = 0; i < NUM_PE; i++) begin
    cmd[i] = CMD_NONE; cmd_budget[i] = '0; ext_x[i] = '0;
  end
  ext_x_vld = '0;
endtask

task automatic host_cmd(input logic [1:0] op, input int pe, input int addr, input int data);
  @(negedge clk);
  host_vld = 1; host_op = op; host_pe = PW'(pe); host_addr = AW'(addr); host_data = DATA_W'(data);
  while (!host_rdy) @(negedge clk);
  @(posedge clk); #1;
  host_vld = 0;
endtask

// issue a master instruction; for invade/retreat, wait for the answer and
// return the number of clocks from the command edge to the done edge
task automatic master_cmd(input int pe, input inv_cmd_t c, input int budget, output int clocks);
  int t0;
  @(negedge clk);
  cmd[pe] = c; cmd_budget[pe] = CNT_W'(budget);
  @(posedge clk); #1;
  t0 = cyc;
  cmd[pe] = CMD_NONE;
  clocks = 0;
  if (c == CMD_INVADE || c == CMD_RETREAT) begin
    while (!cmd_done[pe]) begin
      @(posedge clk); #1;
    end
    clocks = cyc - t0;
  end
endtask

task automatic wait_mgr_idle();
  @(negedge clk);
  while (mgr_busy || !host_rdy) @(negedge clk);
endtask

// stream NS samples into master m, whose region has P slaves, as fast as it
// takes them; check every y at PE m+P and the rate of one per T clocks
task automatic stream_region(int m, int p, mech_t mech_id);
  localparam int NS = 30;
  int t = (N_TAPS + p) / (p + 1);
  logic signed [DATA_W-1:0] u [NS];
  int n_in = 0, n_out = 0, t_prev = -1;
  fork
    begin
      while (n_in < NS) begin
        @(negedge clk);
        ext_x[m] = DATA_W'($urandom_range(0, 65535)); ext_x_vld[m] = 1'b1;
        while (!ext_x_rdy[m]) @(negedge clk);
        u[n_in] = ext_x[m];
        n_in++;
        @(posedge clk); #1;
        ext_x_vld[m] = 1'b0;
      end
    end
    begin
      repeat (NS * (t + 2) + 3 * NUM_PE + 8) begin
        @(posedge clk); #1;
        if (y_vld[m + p]) begin
          longint e = 0;
          for (int k = 0; k < N_TAPS; k++)
            if (n_out - k >= 0) e += longint'(coefs[k]) * longint'(u[n_out - k]);
          check($sformatf("region of %0d PEs: y[%0d]", p + 1, n_out),
                n_out < n_in && longint'(y_out[m + p]) == e);
          if (t_prev >= 0)
            check($sformatf("region of %0d PEs: one output per %0d clocks (%0d)", p + 1, t, cyc - t_prev),
                  cyc - t_prev == t);
          t_prev = cyc;
          n_out++;
          mech[mech_id]++;
        end
      end
    end
  join
  check($sformatf("region of %0d PEs: output count %0d", p + 1, n_out), n_out == NS);
endtask

task automatic wppa_run();
  int clocks;
  quiet_all();
  // coefficients into the program table and into both masters
  for (int k = 0; k < N_TAPS; k++) begin
    coefs[k] = DATA_W'($urandom_range(0, 4000)) - DATA_W'(2000);
    host_cmd(2'd2, 0, k, int'(coefs[k]));
    host_cmd(2'd3, 0, k, int'(coefs[k]));
    host_cmd(2'd3, 4, k, int'(coefs[k]));
  end
  host_cmd(2'd0, 0, 0, 0);
  host_cmd(2'd0, 4, 0, 0);
  @(posedge clk); #1;
  check("masters started", state[0] == S_MASTER_EXE && state[4] == S_MASTER_EXE &&
        flag[0] == FLAG_MASTER && flag[4] == FLAG_MASTER);

  // invade(ALL) from PE 0: PEs 1..3 claimed, master 4 is the boundary
  master_cmd(0, CMD_INVADE, 0, clocks);
  check($sformatf("P = 3 (got %0d)", p_count[0]), p_count[0] == 3);
  check($sformatf("invade over P=3 takes 2P+2 = 8 clocks (took %0d)", clocks), clocks == 8);
  for (int i = 1; i <= 3; i++)
    check($sformatf("PE %0d invaded", i), state[i] == S_INVADED && flag[i] == FLAG_SLAVE);
  check("master 4 not invaded", state[4] == S_MASTER_EXE);
  if (p_count[0] == 3) mech[MECH_INVADE_TO_MASTER]++;

  // invade(ALL) from PE 4 runs to the array end
  master_cmd(4, CMD_INVADE, 0, clocks);
  check($sformatf("PE 4 claims up to the array end (P = %0d)", p_count[4]),
        int'(p_count[4]) == NUM_PE - 5);
  check($sformatf("2P+2 at the array end (took %0d)", clocks), clocks == 2 * (NUM_PE - 5) + 2);
  if (int'(p_count[4]) == NUM_PE - 5) mech[MECH_INVADE_TO_END]++;

  // PE 4 has not infected, so it runs all N taps alone; samples offered
  // back to back so that the input stalls while a sum is in progress
  begin
    logic signed [DATA_W-1:0] h [N_TAPS];
    longint e [8];
    int n_acc = 0, n_seen = 0;
    for (int k = 0; k < N_TAPS; k++) h[k] = '0;
    check("PE 4 runs all taps alone", int'(taps[4]) == N_TAPS);
    fork
      begin
        for (int i = 0; i < 8; i++) begin
          @(negedge clk);
          ext_x[4] = DATA_W'($urandom_range(0, 65535)); ext_x_vld[4] = 1'b1;
          while (!ext_x_rdy[4]) begin
            mech[MECH_SEQ_STALL]++;
            @(negedge clk);
          end
          for (int k = N_TAPS - 1; k > 0; k--) h[k] = h[k-1];
          h[0] = ext_x[4];
          e[i] = 0;
          for (int k = 0; k < N_TAPS; k++) e[i] += longint'(coefs[k]) * longint'(h[k]);
          n_acc++;
        end
        @(negedge clk);
        ext_x_vld[4] = 1'b0;
      end
      begin
        repeat (8 * N_TAPS + 8) begin
          @(posedge clk); #1;
          if (y_vld[4]) begin
            check($sformatf("sequential y[%0d]", n_seen), n_seen < n_acc && longint'(y_out[4]) == e[n_seen]);
            n_seen++;
            mech[MECH_SEQ_OUT]++;
          end
        end
      end
    join
    check("eight sequential outputs", n_seen == 8);
  end

  // infect the region of PE 0 and let the manager start the slaves
  master_cmd(0, CMD_INFECT, 0, clocks);
  for (int i = 0; i < 20 && !(state[1] == S_INFECTED); i++) @(posedge clk);
  #1;
  check("region infected", state[1] == S_INFECTED && state[2] == S_INFECTED && state[3] == S_INFECTED);
  if (state[3] == S_INFECTED) mech[MECH_INFECT]++;
  wait_mgr_idle();
  @(posedge clk); #1;
  check("slaves started", state[1] == S_SLAVE_EXE && state[2] == S_SLAVE_EXE &&
        state[3] == S_SLAVE_EXE && state[5] != S_SLAVE_EXE);
  if (state[3] == S_SLAVE_EXE) mech[MECH_SLAVE_START]++;
  check("PE 0 runs its share of the taps", int'(taps[0]) == (N_TAPS + 3) / 4);

  // samples back to back through PEs 0..3; y at PE 3
  stream_region(0, 3, MECH_PARALLEL_OUT);

  // retreat both regions
  master_cmd(0, CMD_RETREAT, 0, clocks);
  check($sformatf("retreat of PE 0 frees 3 (freed %0d, %0d clocks)", freed_count[0], clocks),
        freed_count[0] == 3 && clocks == 8);
  for (int i = 1; i <= 3; i++) check("freed PE idle", state[i] == S_IDLE && flag[i] == FLAG_FREE);
  if (freed_count[0] == 3) mech[MECH_RETREAT]++;
  master_cmd(4, CMD_RETREAT, 0, clocks);
  check("retreat of PE 4", int'(freed_count[4]) == NUM_PE - 5 && state[NUM_PE-1] == S_IDLE);
  if (int'(freed_count[4]) == NUM_PE - 5) mech[MECH_RETREAT]++;

  // invade with a budget of 2; its retreat ends at an idle PE
  master_cmd(0, CMD_INVADE, 2, clocks);
  check($sformatf("budget 2: P = 2 in 2P clocks (P=%0d, %0d clocks)", p_count[0], clocks),
        p_count[0] == 2 && clocks == 4 && state[3] == S_IDLE);
  if (p_count[0] == 2) mech[MECH_INVADE_BUDGET]++;
  // three PEs share the taps: ceil(N/3) taps each, y at PE 2
  master_cmd(0, CMD_INFECT, 0, clocks);
  repeat (3) @(posedge clk);
  wait_mgr_idle();
  @(posedge clk); #1;
  check("three-PE region running", state[2] == S_SLAVE_EXE &&
        int'(taps[2]) == (N_TAPS + 2) / 3 && int'(taps[0]) == (N_TAPS + 2) / 3);
  stream_region(0, 2, MECH_SPLIT_TAPS_OUT);
  master_cmd(0, CMD_RETREAT, 0, clocks);
  check("budget region retreat", freed_count[0] == 2 && state[1] == S_IDLE && state[2] == S_IDLE);
  if (freed_count[0] == 2) mech[MECH_RETREAT_VIA_IDLE]++;

  // stop interrupts an invaded PE
  master_cmd(0, CMD_INVADE, 1, clocks);
  check("budget 1 claims PE 1", p_count[0] == 1 && state[1] == S_INVADED);
  host_cmd(2'd1, 1, 0, 0);
  @(posedge clk); #1;
  check("stop frees the invaded PE", state[1] == S_IDLE && flag[1] == FLAG_FREE);
  if (state[1] == S_IDLE) mech[MECH_STOP_INVADED]++;
  host_cmd(2'd1, 0, 0, 0);
  host_cmd(2'd1, 4, 0, 0);
  @(posedge clk); #1;
  for (int i = 0; i < NUM_PE; i++) check("all idle at the end", state[i] == S_IDLE);
endtask

task automatic wppa_report();
  for (int m = 0; m < MECH_NUM; m++) begin
    $display("mechanism %s happened %0d times", mech_t'(m), mech[m]);
    check("mechanism happened", mech[m] > 0);
  end
endtask
