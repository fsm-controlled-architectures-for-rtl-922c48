// tb_control_manager - self-checking test of the central control manager.
//
// Checks host commands (start, stop, program-table and PE-memory writes) and
// the infection sequence: infect_in to PEs m+1..m+P, then the program copy
// with T = ceil(N/(P+1)) taps per PE: table words k*T..k*T+T-1 to words
// 0..T-1 of PE m+k (zero beyond the table end) and T to its taps register,
// one write per clock; then start of the same PEs, each step at its exact
// clock. Region sizes giving T = 1 and T = 2 are used. Also checks that
// two requests arriving together are served lowest PE first and that host
// commands wait while the manager is busy.
module tb_control_manager;
  import inv_pkg::*;
  localparam int NUM_PE = 8, N_TAPS = 4, CNT_W = 8;
  localparam int AW = $clog2(N_TAPS), PW = $clog2(NUM_PE);

  logic clk = 1'b0, rst_n = 1'b0;
  logic host_vld, host_rdy, busy;
  logic [1:0] host_op;
  logic [PW-1:0] host_pe;
  logic [AW-1:0] host_addr;
  logic signed [DATA_W-1:0] host_data;
  logic [NUM_PE-1:0] start, stop, infect_in, infect_out, cfg_we, cfg_taps_we;
  logic [CNT_W-1:0] infect_p [NUM_PE];
  logic [AW-1:0] cfg_addr;
  logic signed [DATA_W-1:0] cfg_data;
  int checks = 0, failures = 0;
  logic signed [DATA_W-1:0] tbl [N_TAPS];

  control_manager #(.NUM_PE(NUM_PE), .N_TAPS(N_TAPS), .CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: start=%b stop=%b infect_in=%b cfg_we=%b addr=%0d data=%0d busy=%0b",
               what, start, stop, infect_in, cfg_we, cfg_addr, cfg_data, busy);
    end
  endtask

  task automatic host(input logic [1:0] op, input int pe, input int addr, input int data);
    @(negedge clk);
    host_vld = 1; host_op = op; host_pe = PW'(pe); host_addr = AW'(addr); host_data = DATA_W'(data);
    while (!host_rdy) @(negedge clk);
    @(posedge clk); #1;
    host_vld = 0;
  endtask

  // infect sequence for master m with P claimed PEs; infect_in appears
  // `lead` edges from now (2 after the edge that saw a new request: one to
  // queue it, one to select it)
  task automatic expect_infect(int m, int p, int lead);
    logic [NUM_PE-1:0] region = '0;
    for (int i = m + 1; i <= m + p && i < NUM_PE; i++) region[i] = 1'b1;
    repeat (lead) @(posedge clk);
    #1;
    check($sformatf("infect_in of region of PE %0d", m), infect_in == region && busy);
    for (int k = 1; k <= p; k++) begin
      int t = (N_TAPS + p) / (p + 1);
      for (int w = 0; w < t; w++) begin
        @(posedge clk); #1;
        check($sformatf("load PE %0d word %0d", m + k, w),
              cfg_we == (NUM_PE'(1) << (m + k)) && cfg_taps_we == 0 && cfg_addr == AW'(w) &&
              cfg_data == ((k * t + w < N_TAPS) ? tbl[k * t + w] : DATA_W'(0)));
      end
      @(posedge clk); #1;
      check($sformatf("taps of PE %0d = %0d", m + k, t),
            cfg_taps_we == (NUM_PE'(1) << (m + k)) && cfg_we == 0 && cfg_data == DATA_W'(t));
    end
    @(posedge clk); #1;
    check($sformatf("start region of PE %0d", m), start == region && cfg_we == '0);
    @(posedge clk); #1;
    check("start is a pulse", start == '0 && cfg_taps_we == '0);
  endtask

  initial begin
    host_vld = 0; host_op = 0; host_pe = 0; host_addr = 0; host_data = 0;
    infect_out = '0;
    for (int i = 0; i < NUM_PE; i++) infect_p[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    host(2'd0, 3, 0, 0);
    check("host start PE 3", start == 8'b0000_1000 && stop == 0);
    host(2'd1, 6, 0, 0);
    check("host stop PE 6", stop == 8'b0100_0000 && start == 0);
    for (int k = 0; k < N_TAPS; k++) begin
      tbl[k] = DATA_W'($urandom_range(1, 30000));
      host(2'd2, 0, k, int'(tbl[k]));
      check("table write drives no PE", cfg_we == 0);
    end
    host(2'd3, 5, 2, 1234);
    check("PE memory write", cfg_we == 8'b0010_0000 && cfg_addr == 2 && cfg_data == 1234);

    // single infection: master 1, P = 5 (beyond the 4-word table)
    @(negedge clk);
    infect_out[1] = 1'b1; infect_p[1] = 5;
    @(negedge clk);
    infect_out = '0;
    expect_infect(1, 5, 2);
    check("idle after infection", !busy);

    // two requests together, and a host command that must wait
    @(negedge clk);
    infect_out = 8'b0010_0001; infect_p[0] = 2; infect_p[5] = 1;
    @(negedge clk);
    infect_out = '0;
    check("host waits while requests are queued", !host_rdy);
    expect_infect(0, 2, 2);
    check("second request queued", !host_rdy);
    expect_infect(5, 1, 1);
    host(2'd0, 7, 0, 0);
    check("host served again", start == 8'b1000_0000);

    // P = 0: infection with nothing to load
    @(negedge clk);
    infect_out[4] = 1'b1; infect_p[4] = 0;
    @(negedge clk);
    infect_out = '0;
    @(posedge clk); #1;
    check("P = 0: selected", busy);
    @(posedge clk); #1;
    check("P = 0: no PE infected, back to idle", infect_in == 0 && !busy);
    @(posedge clk); #1;
    check("P = 0: nothing started", start == 0 && cfg_we == 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
