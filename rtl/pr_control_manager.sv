// pr_control_manager - control manager for invasion on an FPGA.
//
// Each of NUM_PR regions of the FPGA holds one hardware module, which plays
// the part of a PE. A module that is started becomes a master. A master in
// region m invades by asking for up to invade_count more modules; the manager
// claims the free regions directly to the right of m, one per clock, stopping
// at the first region that is not free, at the array end or at the count.
// It then infects them: on a partially reconfigurable device (PARTIAL = 1) it
// loads a copy of the master's module into each claimed region through the
// reconfiguration port (pr_req / pr_done, pr_erase = 0); on a device without
// partial reconfiguration the modules already exist and infection only turns
// on their clock enable. Retreat undoes this: the master's slave regions are
// erased (pr_erase = 1) or have their clock enable turned off, and become
// free. done[r] pulses when the request of region r has been carried out;
// with an invade, grant_count gives the number of modules claimed.
//
// Requests are levels, held by the requester until its done pulse. The
// lowest-numbered region is served first; within a region start comes before
// retreat, retreat before invade. The steps (invade, infect by load or clock,
// retreat by erase or clock stop) follow the design; the request interface,
// the one-region-per-clock scan and the clock-enable form of clock control
// are this implementation's choices. The reconfiguration port itself (the
// device's configuration access) is outside this module.
module pr_control_manager
  import inv_pkg::*;
#(
  parameter int unsigned NUM_PR  = 5,
  parameter bit          PARTIAL = 1'b1,
  parameter int unsigned CNT_W   = 4,
  localparam int unsigned RW     = (NUM_PR > 1) ? $clog2(NUM_PR) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NUM_PR-1:0] start_req,
  input  logic [NUM_PR-1:0] invade_req,
  input  logic [CNT_W-1:0]  invade_count [NUM_PR],
  input  logic [NUM_PR-1:0] retreat_req,
  output logic [NUM_PR-1:0] done,
  output logic [CNT_W-1:0]  grant_count,
  output inv_flag_t         role         [NUM_PR],
  output logic [RW-1:0]     owner        [NUM_PR],
  output logic [NUM_PR-1:0] clk_en,
  // reconfiguration port (used when PARTIAL)
  output logic              pr_req,
  output logic              pr_erase,
  output logic [RW-1:0]     pr_region,
  output logic [RW-1:0]     pr_src_region,   // region whose module is copied
  input  logic              pr_done
);

  typedef enum logic [2:0] {
    P_IDLE, P_START, P_SCAN, P_INFECT, P_RETREAT, P_PR_WAIT, P_DONE
  } pr_state_t;

  pr_state_t         pst, pst_after;
  logic [RW-1:0]     m, idx;
  logic [CNT_W-1:0]  want, got;
  logic              any_req;
  logic [RW-1:0]     sel;

  always_comb begin
    any_req = 1'b0;
    sel     = '0;
    for (int i = NUM_PR - 1; i >= 0; i--) begin
      if (start_req[i] || invade_req[i] || retreat_req[i]) begin
        any_req = 1'b1;
        sel     = RW'(i);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pst           <= P_IDLE;
      pst_after     <= P_IDLE;
      m             <= '0;
      idx           <= '0;
      want          <= '0;
      got           <= '0;
      done          <= '0;
      grant_count   <= '0;
      clk_en        <= '0;
      pr_req        <= 1'b0;
      pr_erase      <= 1'b0;
      pr_region     <= '0;
      pr_src_region <= '0;
      for (int i = 0; i < int'(NUM_PR); i++) begin
        role[i]  <= FLAG_FREE;
        owner[i] <= '0;
      end
    end else begin
      done <= '0;
      unique case (pst)
        P_IDLE: begin
          if (any_req && done == '0) begin   // let a served requester drop
            m <= sel;
            if (start_req[sel]) begin
              pst <= P_START;
            end else if (retreat_req[sel]) begin
              idx <= sel;
              pst <= P_RETREAT;
            end else begin
              want <= invade_count[sel];
              got  <= '0;
              idx  <= sel;
              pst  <= P_SCAN;
            end
          end
        end

        // place a master module in region m
        P_START: begin
          role[m]   <= FLAG_MASTER;
          owner[m]  <= m;
          clk_en[m] <= 1'b1;
          if (PARTIAL) begin
            pr_req        <= 1'b1;
            pr_erase      <= 1'b0;
            pr_region     <= m;
            pr_src_region <= m;
            pst_after     <= P_DONE;
            pst           <= P_PR_WAIT;
          end else begin
            pst <= P_DONE;
          end
        end

        // claim the next free region to the right of idx
        P_SCAN: begin
          if (32'(idx) + 1 < 32'(NUM_PR) && got != want &&
              role[32'(idx) + 1] == FLAG_FREE) begin
            idx                  <= idx + RW'(1);
            role[32'(idx) + 1]   <= FLAG_SLAVE;
            owner[32'(idx) + 1]  <= m;
            got                  <= got + CNT_W'(1);
          end else begin
            idx <= m;
            pst <= P_INFECT;
          end
        end

        // infect the claimed regions m+1..m+got, one at a time
        P_INFECT: begin
          if (32'(idx) < 32'(m) + 32'(got)) begin
            idx                  <= idx + RW'(1);
            clk_en[32'(idx) + 1] <= 1'b1;
            if (PARTIAL) begin
              pr_req        <= 1'b1;
              pr_erase      <= 1'b0;
              pr_region     <= idx + RW'(1);
              pr_src_region <= m;
              pst_after     <= P_INFECT;
              pst           <= P_PR_WAIT;
            end
          end else begin
            grant_count <= got;
            pst         <= P_DONE;
          end
        end

        // free every region to the right of m that m owns
        P_RETREAT: begin
          if (32'(idx) + 1 < 32'(NUM_PR) && role[32'(idx) + 1] == FLAG_SLAVE &&
              owner[32'(idx) + 1] == m) begin
            idx                  <= idx + RW'(1);
            role[32'(idx) + 1]   <= FLAG_FREE;
            clk_en[32'(idx) + 1] <= 1'b0;
            if (PARTIAL) begin
              pr_req        <= 1'b1;
              pr_erase      <= 1'b1;
              pr_region     <= idx + RW'(1);
              pr_src_region <= m;
              pst_after     <= P_RETREAT;
              pst           <= P_PR_WAIT;
            end
          end else begin
            pst <= P_DONE;
          end
        end

        P_PR_WAIT: begin
          if (pr_done) begin
            pr_req <= 1'b0;
            pst    <= pst_after;
          end
        end

        P_DONE: begin
          done[m] <= 1'b1;
          pst     <= P_IDLE;
        end

        default: pst <= P_IDLE;
      endcase
    end
  end

  // the reconfiguration request is held until the port answers
  always_ff @(posedge clk) begin
    if (rst_n && pst == P_PR_WAIT)
      assert (pr_req) else $error("pr_req dropped while waiting");
  end

endmodule
