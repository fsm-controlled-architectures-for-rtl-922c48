// tb_invasive_controller - self-checking test of the per-PE invasion FSM.
//
// Drives every input of one controller directly and checks state, flag and
// the registered outputs one clock later against the transition and output
// tables: invasion, forwarding with budget, count ripple (+1), infection,
// slave start, retreat with forwarding, stop in each state, the master's
// invade / infect / retreat instructions and the boundary answers.
module tb_invasive_controller;
  import inv_pkg::*;
  localparam int unsigned CNT_W = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, stop, infect_in, invade_in, retreat_in, ack_in;
  logic [CNT_W-1:0] budget_in, pe_in, cmd_budget;
  inv_cmd_t cmd;
  logic infect_out, ack_out, invade_out, retreat_out, cmd_busy, cmd_done;
  logic [CNT_W-1:0] infect_p, pe_out, budget_out, p_count, freed_count;
  inv_state_t state;
  inv_flag_t  flag;
  int checks = 0, failures = 0;

  invasive_controller #(.CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle_inputs();
    start = 0; stop = 0; infect_in = 0; invade_in = 0; retreat_in = 0; ack_in = 0;
    budget_in = '0; pe_in = '0; cmd = CMD_NONE; cmd_budget = '0;
  endtask

  // apply the inputs for one clock, then return just after the edge
  task automatic step();
    @(posedge clk); #1;
    idle_inputs();
  endtask

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (state=%s flag=%s ack_out=%0b pe_out=%0d invade_out=%0b retreat_out=%0b)",
               what, state.name(), flag.name(), ack_out, pe_out, invade_out, retreat_out);
    end
  endtask

  initial begin
    idle_inputs();
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    check("reset idle", state == S_IDLE && flag == FLAG_FREE && !ack_out && !invade_out);

    // idle: invaded with unlimited budget -> forward invasion
    invade_in = 1; budget_in = 0; step();
    check("s0 invade_in -> s2", state == S_INVADED && flag == FLAG_SLAVE);
    check("invade_out forwarded, budget 0", invade_out && budget_out == 0 && !ack_out);
    step();
    check("invade_out is a pulse", !invade_out);
    // boundary answers 1, we add one
    ack_in = 1; pe_in = 1; step();
    check("s2 ack ripple +1", ack_out && pe_out == 2 && state == S_INVADED);
    step();
    check("ack_out is a pulse", !ack_out);
    // infect, start -> slave execution
    infect_in = 1; step();
    check("s2 infect_in -> s3", state == S_INFECTED && flag == FLAG_SLAVE);
    ack_in = 1; pe_in = 5; step();
    check("s3 ack ripple", ack_out && pe_out == 6 && state == S_INFECTED);
    start = 1; step();
    check("s3 start -> s4", state == S_SLAVE_EXE && flag == FLAG_SLAVE);
    ack_in = 1; pe_in = 3; step();
    check("s4 ack ripple", ack_out && pe_out == 4 && state == S_SLAVE_EXE);
    retreat_in = 1; step();
    check("s4 retreat -> s0 with retreat_out", state == S_IDLE && flag == FLAG_FREE && retreat_out);
    // freed PE passes the retreat acknowledgement on
    ack_in = 1; pe_in = 1; step();
    check("s0 ack ripple", ack_out && pe_out == 2 && state == S_IDLE);

    // retreat from s2 and s3, stop in s2, s3, s4
    invade_in = 1; budget_in = 5; step();
    check("budget decremented", invade_out && budget_out == 4);
    retreat_in = 1; step();
    check("s2 retreat -> s0", state == S_IDLE && retreat_out);
    invade_in = 1; step(); infect_in = 1; step();
    retreat_in = 1; step();
    check("s3 retreat -> s0", state == S_IDLE && retreat_out);
    invade_in = 1; step(); stop = 1; step();
    check("s2 stop -> s0 silently", state == S_IDLE && !retreat_out && flag == FLAG_FREE);
    invade_in = 1; step(); infect_in = 1; step(); stop = 1; step();
    check("s3 stop -> s0", state == S_IDLE && !retreat_out);
    invade_in = 1; step(); infect_in = 1; step(); start = 1; step(); stop = 1; step();
    check("s4 stop -> s0", state == S_IDLE && !retreat_out);
    // infect_in or start while idle do nothing
    infect_in = 1; step();
    check("s0 ignores infect_in", state == S_IDLE);

    // budget 1: claim self, answer with 2, do not forward
    invade_in = 1; budget_in = 1; step();
    check("budget 1 stops invasion", state == S_INVADED && ack_out && pe_out == 2 && !invade_out);
    stop = 1; step();

    // idle PE hit by retreat answers as boundary
    retreat_in = 1; step();
    check("s0 retreat_in answered", ack_out && pe_out == 1 && state == S_IDLE);

    // master
    start = 1; step();
    check("s0 start -> s1", state == S_MASTER_EXE && flag == FLAG_MASTER);
    invade_in = 1; step();
    check("s1 invade_in -> ack 1", ack_out && pe_out == 1 && state == S_MASTER_EXE);
    retreat_in = 1; step();
    check("s1 retreat_in -> ack 1", ack_out && pe_out == 1 && state == S_MASTER_EXE);
    cmd = CMD_INVADE; cmd_budget = 7; step();
    check("invade instruction", invade_out && budget_out == 7 && cmd_busy);
    cmd = CMD_RETREAT; step();
    check("no second command while busy", !retreat_out && cmd_busy);
    ack_in = 1; pe_in = 4; step();
    check("invade result P = PE_in - 1", cmd_done && !cmd_busy && p_count == 3 && !ack_out);
    cmd = CMD_INFECT; step();
    check("infect instruction", infect_out && infect_p == 3 && !cmd_busy);
    cmd = CMD_RETREAT; step();
    check("retreat instruction", retreat_out && cmd_busy);
    ack_in = 1; pe_in = 4; step();
    check("retreat result", cmd_done && freed_count == 3 && p_count == 0);
    stop = 1; step();
    check("s1 stop -> s0", state == S_IDLE && flag == FLAG_FREE);

    // start and invade_in together: start wins, invader told no
    start = 1; invade_in = 1; step();
    check("start beats invade", state == S_MASTER_EXE && ack_out && pe_out == 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
