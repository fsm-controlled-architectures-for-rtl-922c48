// control_manager - central control manager on the configuration bus.
//
// Drives the per-PE start and stop lines, relays infection and copies the
// program into infected PEs. A host talks to it through a one-command-per-
// clock port (valid/ready):
//   OP_START / OP_STOP  pulse start or stop of PE host_pe (a start turns an
//                       idle PE into a master);
//   OP_WR_TABLE         write word host_addr of the program table, which holds
//                       the filter coefficients a[0..N_TAPS-1];
//   OP_WR_PE            write word host_addr of PE host_pe's coefficient
//                       memory (used to load a master's own program).
// When a master m raises infect_out with P, the manager pulses infect_in of
// PEs m+1..m+P (only PEs that were invaded react) and copies the program:
// with T = ceil(N_TAPS/(P+1)) taps per PE, PE m+k receives table words
// k*T .. k*T+T-1 in its words 0..T-1 (zero beyond the table end) and then T
// in its taps register, one write per clock. Finally it pulses start of PEs
// m+1..m+P, which begin slave execution. If the infect_out pulse is sampled
// at edge C, infect_in is driven from edge C+2, the P*(T+1) writes from edge
// C+3 on, and start at edge C+3+P*(T+1). Requests from several masters are
// queued and served lowest PE first; busy is high while one is in progress
// and host commands wait meanwhile. PE 0 has no left neighbour, so it can
// never be a slave: its infect_in and cfg_taps_we bits stay 0 by design.
// The roles of the manager follow the design; the command set, the table and
// the order of the infection steps are this implementation's choices.
module control_manager
  import inv_pkg::*;
#(
  parameter int unsigned NUM_PE = 4,
  parameter int unsigned N_TAPS = 64,
  parameter int unsigned CNT_W  = 8,
  localparam int unsigned AW    = (N_TAPS > 1) ? $clog2(N_TAPS) : 1,
  localparam int unsigned PW    = (NUM_PE > 1) ? $clog2(NUM_PE) : 1,
  localparam int unsigned TW    = $clog2(N_TAPS + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // host
  input  logic                     host_vld,
  output logic                     host_rdy,
  input  logic [1:0]               host_op,
  input  logic [PW-1:0]            host_pe,
  input  logic [AW-1:0]            host_addr,
  input  logic signed [DATA_W-1:0] host_data,
  output logic                     busy,
  // configuration bus
  output logic [NUM_PE-1:0]        start,
  output logic [NUM_PE-1:0]        stop,
  output logic [NUM_PE-1:0]        infect_in,
  input  logic [NUM_PE-1:0]        infect_out,
  input  logic [CNT_W-1:0]         infect_p [NUM_PE],
  output logic [NUM_PE-1:0]        cfg_we,
  output logic [NUM_PE-1:0]        cfg_taps_we,
  output logic [AW-1:0]            cfg_addr,
  output logic signed [DATA_W-1:0] cfg_data
);

  localparam logic [1:0] OP_START = 2'd0, OP_STOP = 2'd1,
                         OP_WR_TABLE = 2'd2, OP_WR_PE = 2'd3;

  typedef enum logic [1:0] {M_IDLE, M_INFECT, M_LOAD, M_START} mgr_state_t;

  mgr_state_t               mst;
  logic signed [DATA_W-1:0] table_mem [N_TAPS];
  logic [NUM_PE-1:0]        req;              // queued infect requests
  logic [CNT_W-1:0]         req_p [NUM_PE];
  logic [PW-1:0]            master;
  logic [CNT_W-1:0]         p_cur, k;
  logic [TW-1:0]            t_cur, w;
  int unsigned              word;             // table word k*T + w
  logic [NUM_PE-1:0]        region;           // PEs m+1..m+P
  logic                     sel_found;
  logic [PW-1:0]            sel;

  // lowest queued request
  always_comb begin
    sel_found = 1'b0;
    sel       = '0;
    for (int i = NUM_PE - 1; i >= 0; i--) begin
      if (req[i]) begin
        sel_found = 1'b1;
        sel       = PW'(i);
      end
    end
  end

  assign busy     = (mst != M_IDLE);
  assign word     = 32'(k) * 32'(t_cur) + 32'(w);
  assign host_rdy = !busy && !sel_found;

  always_ff @(posedge clk) begin
    if (host_vld && host_rdy && host_op == OP_WR_TABLE)
      table_mem[host_addr] <= host_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mst       <= M_IDLE;
      req       <= '0;
      for (int i = 0; i < int'(NUM_PE); i++) req_p[i] <= '0;
      master    <= '0;
      p_cur     <= '0;
      k         <= '0;
      t_cur     <= '0;
      w         <= '0;
      region    <= '0;
      start     <= '0;
      stop      <= '0;
      infect_in <= '0;
      cfg_we    <= '0;
      cfg_taps_we <= '0;
      cfg_addr  <= '0;
      cfg_data  <= '0;
    end else begin
      start     <= '0;
      stop      <= '0;
      infect_in <= '0;
      cfg_we    <= '0;
      cfg_taps_we <= '0;

      for (int i = 0; i < int'(NUM_PE); i++) begin
        if (infect_out[i]) begin
          req[i]   <= 1'b1;
          req_p[i] <= infect_p[i];
        end
      end

      unique case (mst)
        M_IDLE: begin
          if (sel_found) begin
            req[sel] <= infect_out[sel];
            master   <= sel;
            p_cur    <= req_p[sel];
            t_cur    <= TW'(taps_per_pe(N_TAPS, 32'(req_p[sel]) + 1));
            region   <= '0;
            for (int i = 0; i < int'(NUM_PE); i++)
              if (i > int'(sel) && i <= int'(sel) + int'(req_p[sel]))
                region[i] <= 1'b1;
            mst <= M_INFECT;
          end else if (host_vld) begin
            unique case (host_op)
              OP_START: start[host_pe] <= 1'b1;
              OP_STOP:  stop[host_pe]  <= 1'b1;
              OP_WR_PE: begin
                cfg_we[host_pe] <= 1'b1;
                cfg_addr        <= host_addr;
                cfg_data        <= host_data;
              end
              default: ;
            endcase
          end
        end
        M_INFECT: begin
          infect_in <= region;
          k         <= CNT_W'(1);
          w         <= '0;
          mst       <= (p_cur == '0) ? M_IDLE : M_LOAD;
        end
        M_LOAD: begin
          if (w == t_cur) begin             // words done: taps register
            if (32'(master) + 32'(k) < 32'(NUM_PE))
              cfg_taps_we[32'(master) + 32'(k)] <= 1'b1;
            cfg_data <= DATA_W'(t_cur);
            w        <= '0;
            k        <= k + CNT_W'(1);
            if (k == p_cur) mst <= M_START;
          end else begin
            if (32'(master) + 32'(k) < 32'(NUM_PE))
              cfg_we[32'(master) + 32'(k)] <= 1'b1;
            cfg_addr <= AW'(w);
            cfg_data <= (word < N_TAPS) ? table_mem[AW'(word)] : '0;
            w        <= w + TW'(1);
          end
        end
        M_START: begin
          start <= region;
          mst   <= M_IDLE;
        end
        default: mst <= M_IDLE;
      endcase
    end
  end

endmodule
