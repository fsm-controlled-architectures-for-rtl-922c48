// tb_invasive_wppa_array - end-to-end test of the invasive processor array.
//
// Six PEs and a 4-tap filter, so that PE 0 with three claimed PEs forms a
// region with one tap per PE. Runs the shared scenario (see wppa_scenario.svh):
// invasion stopped by a master and by the array end, invasion with a budget,
// infection and slave start, filtering against a reference on a lone master
// (4 taps), a region of four (1 tap each) and a region of three (2 taps each),
// retreat, and stop of an invaded PE, with 2P+2 timing checks.
module tb_invasive_wppa_array;
  import inv_pkg::*;
  localparam int NUM_PE = 6, N_TAPS = 4, CNT_W = 8;
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
  int checks = 0, failures = 0;

  invasive_wppa_array #(.NUM_PE(NUM_PE), .N_TAPS(N_TAPS), .CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  `include "wppa_scenario.svh"

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    quiet_all();
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wppa_run();
    wppa_report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
