// invasive_controller - per-PE invasion FSM of the linear invasive array.
//
// Five states: idle (s0), master execution (s1), invaded (s2), infected (s3)
// and slave execution (s4). Invasion travels left to right: a PE in s0 that
// sees invade_in becomes a slave candidate (s2) and passes invade_out to its
// right neighbour. The first PE that cannot be invaded (a master in s1, or the
// array end) answers with ack and a count of 1; every invaded PE on the way
// back adds one (pe_out = pe_in + 1). The master therefore receives P + 1,
// where P is the number of PEs it claimed, and stores P. Retreat travels the
// same way: retreat_in sends an s2/s3/s4 PE back to s0 and is passed on; the
// boundary answers, and the acknowledgement ripples back through the freed
// (now idle) PEs, each adding one. stop sends any PE back to s0 without
// forwarding anything. infect_in moves s2 to s3, start moves s3 to s4 (and
// s0 to s1). The transition and output tables follow the design's FSM
// definition; every output is registered, so each hop costs one clock and an
// invade or retreat over P PEs completes 2*P + 2 cycles after the command.
//
// A master issues its atomic invade / infect / retreat instructions through
// the cmd port (one-cycle request, ignored while a previous invade or retreat
// is still waiting for its acknowledgement). invade carries a budget, the
// largest number of PEs to claim (0 = as many as possible): a PE that receives
// a budget of 1 claims itself, does not invade further and answers at once
// with count 2, as if the boundary behind it had answered. infect emits a
// one-cycle infect_out with the stored P for the control manager.
//
// Own choices, not given by the design: the budget field, the cmd port, an
// idle PE answering a stray retreat_in like a boundary, start taking priority
// over a simultaneous invade_in (which is then answered as by a master),
// retreat_in taking priority over stop, and an active-low synchronous reset.
module invasive_controller
  import inv_pkg::*;
#(
  parameter int unsigned CNT_W = 8            // width of PE counts and budgets
) (
  input  logic             clk,
  input  logic             rst_n,
  // configuration bus (from the control manager)
  input  logic             start,
  input  logic             stop,
  input  logic             infect_in,
  output logic             infect_out,
  output logic [CNT_W-1:0] infect_p,          // P accompanying infect_out
  // left neighbour (towards the master)
  input  logic             invade_in,
  input  logic [CNT_W-1:0] budget_in,
  input  logic             retreat_in,
  output logic             ack_out,
  output logic [CNT_W-1:0] pe_out,
  // right neighbour (away from the master)
  output logic             invade_out,
  output logic [CNT_W-1:0] budget_out,
  output logic             retreat_out,
  input  logic             ack_in,
  input  logic [CNT_W-1:0] pe_in,
  // master instruction port
  input  inv_cmd_t         cmd,
  input  logic [CNT_W-1:0] cmd_budget,
  output logic             cmd_busy,          // invade/retreat awaiting ack
  output logic             cmd_done,          // one-cycle pulse on that ack
  output logic [CNT_W-1:0] p_count,           // P of the last invade
  output logic [CNT_W-1:0] freed_count,       // PEs freed by the last retreat
  // status
  output inv_state_t       state,
  output inv_flag_t        flag
);

  inv_cmd_t pending;

  assign cmd_busy = (pending != CMD_NONE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      flag        <= FLAG_FREE;
      pending     <= CMD_NONE;
      invade_out  <= 1'b0;
      budget_out  <= '0;
      retreat_out <= 1'b0;
      ack_out     <= 1'b0;
      pe_out      <= '0;
      infect_out  <= 1'b0;
      infect_p    <= '0;
      cmd_done    <= 1'b0;
      p_count     <= '0;
      freed_count <= '0;
    end else begin
      // outputs are one-cycle pulses unless set below
      invade_out  <= 1'b0;
      retreat_out <= 1'b0;
      ack_out     <= 1'b0;
      infect_out  <= 1'b0;
      cmd_done    <= 1'b0;

      unique case (state)
        S_IDLE: begin
          if (start) begin
            state   <= S_MASTER_EXE;
            flag    <= FLAG_MASTER;
            pending <= CMD_NONE;
            if (invade_in) begin            // cannot be claimed any more
              ack_out <= 1'b1;
              pe_out  <= CNT_W'(1);
            end
          end else if (invade_in) begin
            state <= S_INVADED;
            flag  <= FLAG_SLAVE;
            if (budget_in == CNT_W'(1)) begin
              ack_out <= 1'b1;              // last PE the invader asked for
              pe_out  <= CNT_W'(2);
            end else begin
              invade_out <= 1'b1;
              budget_out <= (budget_in == '0) ? '0 : budget_in - CNT_W'(1);
            end
          end else if (ack_in) begin        // retreat acknowledgement ripple
            ack_out <= 1'b1;
            pe_out  <= pe_in + CNT_W'(1);
          end else if (retreat_in) begin    // nothing to free: act as boundary
            ack_out <= 1'b1;
            pe_out  <= CNT_W'(1);
          end
        end

        S_MASTER_EXE: begin
          if (invade_in || retreat_in) begin  // non-invadable boundary
            ack_out <= 1'b1;
            pe_out  <= CNT_W'(1);
          end
          if (stop) begin
            state   <= S_IDLE;
            flag    <= FLAG_FREE;
            pending <= CMD_NONE;
          end else begin
            if (ack_in && pending != CMD_NONE) begin
              cmd_done <= 1'b1;
              pending  <= CMD_NONE;
              if (pending == CMD_INVADE) begin
                p_count <= pe_in - CNT_W'(1);
              end else begin
                freed_count <= pe_in - CNT_W'(1);
                p_count     <= '0;
              end
            end else if (pending == CMD_NONE) begin
              unique case (cmd)
                CMD_INVADE: begin
                  invade_out <= 1'b1;
                  budget_out <= cmd_budget;
                  pending    <= CMD_INVADE;
                end
                CMD_RETREAT: begin
                  retreat_out <= 1'b1;
                  pending     <= CMD_RETREAT;
                end
                CMD_INFECT: begin
                  infect_out <= 1'b1;
                  infect_p   <= p_count;
                end
                default: ;
              endcase
            end
          end
        end

        S_INVADED, S_INFECTED, S_SLAVE_EXE: begin
          if (ack_in) begin
            ack_out <= 1'b1;
            pe_out  <= pe_in + CNT_W'(1);
          end
          if (retreat_in) begin
            state       <= S_IDLE;
            flag        <= FLAG_FREE;
            retreat_out <= 1'b1;
          end else if (stop) begin
            state <= S_IDLE;
            flag  <= FLAG_FREE;
          end else if (state == S_INVADED && infect_in) begin
            state <= S_INFECTED;
          end else if (state == S_INFECTED && start) begin
            state <= S_SLAVE_EXE;
          end
        end

        default: begin
          state <= S_IDLE;
          flag  <= FLAG_FREE;
        end
      endcase
    end
  end

  // the two-bit flag always agrees with the state
  always_ff @(posedge clk) begin
    if (rst_n)
      assert ((flag == FLAG_MASTER) == (state == S_MASTER_EXE) &&
              (flag == FLAG_FREE)   == (state == S_IDLE))
        else $error("flag %s disagrees with state %s", flag.name(), state.name());
  end

endmodule
