// invasive_pe - processing element of the linear invasive array.
//
// Combines the invasion controller (with its two-bit master/slave flag), a
// coefficient memory of N_TAPS words and a taps-per-PE register loaded over
// the configuration bus, and the FIR function unit of the case study.
// The function unit runs while the PE is a master (s1) or a slave (s4):
//   * a master takes samples from its external port (ext_x, paced by
//     ext_x_rdy) and is the first PE of its region. Until it has infected a
//     region it runs all N_TAPS taps alone (one sample every N_TAPS clocks);
//     after infect with P PEs it runs its share T = ceil(N_TAPS/(P+1)), until
//     it retreats or stops.
//   * a slave takes samples and partial sums from its left neighbour and
//     runs T taps, T being written by the control manager at infection.
// In idle, invaded and infected states the unit is held cleared; it is also
// cleared for one clock whenever T changes (infect, retreat), so that a
// region always starts from an all-zero sample history.
// y_out / y_vld give the PE's partial sum; at the last PE of a region (or at
// a master running alone) it is the filter output. The instruction memory,
// register files and branch unit of a programmable PE are not modelled; the
// FIR unit stands in for the program the region runs. When and how a master
// picks its share of the taps is this implementation's choice.
module invasive_pe
  import inv_pkg::*;
#(
  parameter int unsigned N_TAPS = 64,
  parameter int unsigned CNT_W  = 8,
  localparam int unsigned AW    = (N_TAPS > 1) ? $clog2(N_TAPS) : 1,
  localparam int unsigned TW    = $clog2(N_TAPS + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // configuration bus
  input  logic                     start,
  input  logic                     stop,
  input  logic                     infect_in,
  output logic                     infect_out,
  output logic [CNT_W-1:0]         infect_p,
  input  logic                     cfg_we,      // write coefficient word
  input  logic                     cfg_taps_we, // write taps-per-PE register
  input  logic [AW-1:0]            cfg_addr,
  input  logic signed [DATA_W-1:0] cfg_data,
  // invasion links, left side
  input  logic                     invade_in,
  input  logic [CNT_W-1:0]         budget_in,
  input  logic                     retreat_in,
  output logic                     ack_out,
  output logic [CNT_W-1:0]         pe_out,
  // invasion links, right side
  output logic                     invade_out,
  output logic [CNT_W-1:0]         budget_out,
  output logic                     retreat_out,
  input  logic                     ack_in,
  input  logic [CNT_W-1:0]         pe_in,
  // data links: in0/in1 from the left, out0/out1 to the right
  input  logic signed [DATA_W-1:0] x_in,
  input  logic                     x_in_vld,
  input  logic signed [ACC_W-1:0]  s_in,
  input  logic                     s_in_vld,
  output logic signed [DATA_W-1:0] x_out,
  output logic                     x_out_vld,
  output logic signed [ACC_W-1:0]  s_out,
  output logic                     s_out_vld,
  // external sample port (used while master)
  input  logic signed [DATA_W-1:0] ext_x,
  input  logic                     ext_x_vld,
  output logic                     ext_x_rdy,
  // result
  output logic signed [ACC_W-1:0]  y_out,
  output logic                     y_vld,
  // master instruction port and status
  input  inv_cmd_t                 cmd,
  input  logic [CNT_W-1:0]         cmd_budget,
  output logic                     cmd_busy,
  output logic                     cmd_done,
  output logic [CNT_W-1:0]         p_count,
  output logic [CNT_W-1:0]         freed_count,
  output inv_state_t               state,
  output inv_flag_t                flag,
  output logic [TW-1:0]            taps         // T in use
);

  logic signed [DATA_W-1:0] coef_mem [N_TAPS];
  logic [AW-1:0]            coef_addr;
  logic [TW-1:0]            slave_taps;
  logic [CNT_W-1:0]         region_p;          // P of the infected region
  logic [TW-1:0]            taps_q;
  logic                     is_master, fu_en, fu_rdy;

  invasive_controller #(.CNT_W(CNT_W)) u_ctrl (
    .clk, .rst_n,
    .start, .stop, .infect_in, .infect_out, .infect_p,
    .invade_in, .budget_in, .retreat_in, .ack_out, .pe_out,
    .invade_out, .budget_out, .retreat_out, .ack_in, .pe_in,
    .cmd, .cmd_budget, .cmd_busy, .cmd_done, .p_count, .freed_count,
    .state, .flag
  );

  always_ff @(posedge clk) begin
    if (cfg_we) coef_mem[cfg_addr] <= cfg_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      slave_taps <= TW'(1);
      region_p   <= '0;
      taps_q     <= '0;
    end else begin
      taps_q <= taps;
      if (cfg_taps_we) slave_taps <= TW'(cfg_data);
      if (infect_out)
        region_p <= infect_p;
      else if (state != S_MASTER_EXE || (cmd_done && p_count == '0))
        region_p <= '0;                // stopped, or region retreated
    end
  end

  assign is_master = (state == S_MASTER_EXE);
  // a change of T restarts the unit from an empty history, like the slaves
  assign fu_en     = (is_master || (state == S_SLAVE_EXE)) && (taps == taps_q);
  assign taps      = is_master ? TW'(taps_per_pe(N_TAPS, 32'(region_p) + 1))
                               : slave_taps;

  fir_tap_fu #(.N_TAPS(N_TAPS)) u_fu (
    .clk, .rst_n,
    .en        (fu_en),
    .first     (is_master),
    .taps,
    .coef_addr,
    .coef      (coef_mem[coef_addr]),
    .x_in      (is_master ? ext_x : x_in),
    .x_in_vld  (is_master ? ext_x_vld : x_in_vld),
    .x_rdy     (fu_rdy),
    .s_in, .s_in_vld,
    .x_out, .x_out_vld, .s_out, .s_out_vld
  );

  assign ext_x_rdy = is_master && fu_rdy;
  assign y_out     = s_out;
  assign y_vld     = s_out_vld;

endmodule
