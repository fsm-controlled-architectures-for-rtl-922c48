// invasive_wppa_array - linear invasive processor array with control manager.
//
// NUM_PE processing elements form a chain. Invade, budget and retreat run
// from PE i to PE i+1; ack and the PE count run back from PE i+1 to PE i; the
// FIR data links (sample out0 -> in0, partial sum out1 -> in1) run left to
// right. The left end receives no invasion and no data; at the right end a
// terminator answers an invade or retreat of the last PE one clock later
// with ack and count 1, exactly as a non-invadable PE does, so a region that
// reaches the array end is measured like any other. All start, stop, infect
// and coefficient-load lines go through the control manager, which the host
// drives. Every PE has its own external sample port (used only while it is a
// master), its own result port, its own instruction port through which a
// master issues invade, infect and retreat, and reports the number of filter
// taps it is running (taps).
module invasive_wppa_array
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
  // host side of the control manager
  input  logic                     host_vld,
  output logic                     host_rdy,
  input  logic [1:0]               host_op,
  input  logic [PW-1:0]            host_pe,
  input  logic [AW-1:0]            host_addr,
  input  logic signed [DATA_W-1:0] host_data,
  output logic                     mgr_busy,
  // per-PE instruction ports
  input  inv_cmd_t                 cmd        [NUM_PE],
  input  logic [CNT_W-1:0]         cmd_budget [NUM_PE],
  output logic [NUM_PE-1:0]        cmd_busy,
  output logic [NUM_PE-1:0]        cmd_done,
  output logic [CNT_W-1:0]         p_count    [NUM_PE],
  output logic [CNT_W-1:0]         freed_count[NUM_PE],
  // per-PE sample and result ports
  input  logic signed [DATA_W-1:0] ext_x      [NUM_PE],
  input  logic [NUM_PE-1:0]        ext_x_vld,
  output logic [NUM_PE-1:0]        ext_x_rdy,
  output logic signed [ACC_W-1:0]  y_out      [NUM_PE],
  output logic [NUM_PE-1:0]        y_vld,
  // status
  output inv_state_t               state      [NUM_PE],
  output inv_flag_t                flag       [NUM_PE],
  output logic [TW-1:0]            taps       [NUM_PE]
);

  // chain nets; index i is the link entering PE i from the left
  logic [NUM_PE:0]          invade_l, retreat_l, ack_l;
  logic [CNT_W-1:0]         budget_l [NUM_PE+1];
  logic [CNT_W-1:0]         pe_l     [NUM_PE+1];
  logic signed [DATA_W-1:0] x_l      [NUM_PE+1];
  logic signed [ACC_W-1:0]  s_l      [NUM_PE+1];
  logic [NUM_PE:0]          xv_l, sv_l;

  logic [NUM_PE-1:0]        start, stop, infect_in, infect_out, cfg_we, cfg_taps_we;
  logic [CNT_W-1:0]         infect_p [NUM_PE];
  logic [AW-1:0]            cfg_addr;
  logic signed [DATA_W-1:0] cfg_data;

  assign invade_l[0]  = 1'b0;
  assign budget_l[0]  = '0;
  assign retreat_l[0] = 1'b0;
  assign x_l[0]       = '0;
  assign xv_l[0]      = 1'b0;
  assign s_l[0]       = '0;
  assign sv_l[0]      = 1'b0;

  control_manager #(.NUM_PE(NUM_PE), .N_TAPS(N_TAPS), .CNT_W(CNT_W)) u_mgr (
    .clk, .rst_n,
    .host_vld, .host_rdy, .host_op, .host_pe, .host_addr, .host_data,
    .busy (mgr_busy),
    .start, .stop, .infect_in, .infect_out, .infect_p,
    .cfg_we, .cfg_taps_we, .cfg_addr, .cfg_data
  );

  for (genvar i = 0; i < NUM_PE; i++) begin : g_pe
    invasive_pe #(.N_TAPS(N_TAPS), .CNT_W(CNT_W)) u_pe (
      .clk, .rst_n,
      .start (start[i]), .stop (stop[i]),
      .infect_in (infect_in[i]), .infect_out (infect_out[i]),
      .infect_p (infect_p[i]),
      .cfg_we (cfg_we[i]), .cfg_taps_we (cfg_taps_we[i]), .cfg_addr, .cfg_data,
      .invade_in (invade_l[i]), .budget_in (budget_l[i]),
      .retreat_in (retreat_l[i]),
      .ack_out (ack_l[i]), .pe_out (pe_l[i]),
      .invade_out (invade_l[i+1]), .budget_out (budget_l[i+1]),
      .retreat_out (retreat_l[i+1]),
      .ack_in (ack_l[i+1]), .pe_in (pe_l[i+1]),
      .x_in (x_l[i]), .x_in_vld (xv_l[i]), .s_in (s_l[i]), .s_in_vld (sv_l[i]),
      .x_out (x_l[i+1]), .x_out_vld (xv_l[i+1]),
      .s_out (s_l[i+1]), .s_out_vld (sv_l[i+1]),
      .ext_x (ext_x[i]), .ext_x_vld (ext_x_vld[i]), .ext_x_rdy (ext_x_rdy[i]),
      .y_out (y_out[i]), .y_vld (y_vld[i]),
      .cmd (cmd[i]), .cmd_budget (cmd_budget[i]),
      .cmd_busy (cmd_busy[i]), .cmd_done (cmd_done[i]),
      .p_count (p_count[i]), .freed_count (freed_count[i]),
      .state (state[i]), .flag (flag[i]), .taps (taps[i])
    );
  end

  // right-end terminator: behaves as a non-invadable neighbour
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ack_l[NUM_PE] <= 1'b0;
      pe_l[NUM_PE]  <= '0;
    end else begin
      ack_l[NUM_PE] <= invade_l[NUM_PE] || retreat_l[NUM_PE];
      pe_l[NUM_PE]  <= CNT_W'(1);
    end
  end

endmodule
