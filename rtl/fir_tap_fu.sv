// fir_tap_fu - FIR function unit of a PE: T consecutive taps of a filter that
// a region of PEs computes as a systolic pipeline.
//
// A region of P+1 PEs (master first) computes y[s] = sum_k a[k]*u[s-k] with
// N taps by giving each PE T = ceil(N/(P+1)) of them: PE j holds
// a[j*T .. j*T+T-1] in words 0..T-1 of its coefficient memory. With P = 0 the
// master alone runs all N taps (T = N), which is the single-PE program; with
// P + 1 = N each PE runs one tap and the region takes one sample per clock;
// in between it takes one sample every T clocks.
//
// Each PE keeps the last T samples it received in a local delay line. When a
// sample arrives (x_in_vld while x_rdy), the PE
//   * shifts it into the delay line and passes the sample that was received
//     T samples earlier to the right (x_out, valid for one clock), and
//   * runs T multiply-accumulates, one per clock, over a[jT+t]*d[t]; at the
//     last one it adds the partial sum arriving from the left (zero for the
//     first PE of the region) and sends the result right (s_out, one clock).
// Because the right neighbour starts one clock later, the partial sum it
// needs arrives exactly in the clock of its own last MAC, so no buffering is
// needed. The last PE of the region delivers y[s] from its s_out register
// P + T - 1 clocks after the edge at which the master took u[s]. x_rdy is low
// while the MACs run, which paces the master's input. A sample delayed by T
// per PE and a sum that is complete when it leaves each PE is what makes the
// chain compute the convolution; the per-PE instruction of the case study
// (move sample, multiply, add, one register each) is the T = 1 case but with
// equal delays on both paths would not.
//
// The split into T taps per PE follows the rate the design states for
// regions smaller than N; how the taps are split and scheduled is this
// implementation's choice. While en is low the unit is held cleared, so a
// region starts from an all-zero sample history.
module fir_tap_fu
  import inv_pkg::*;
#(
  parameter int unsigned N_TAPS = 64,                   // most taps per PE
  localparam int unsigned AW    = (N_TAPS > 1) ? $clog2(N_TAPS) : 1,
  localparam int unsigned TW    = $clog2(N_TAPS + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,        // PE is executing the filter
  input  logic                     first,     // PE is the first of its region
  input  logic [TW-1:0]            taps,      // T, 1..N_TAPS
  output logic [AW-1:0]            coef_addr,
  input  logic signed [DATA_W-1:0] coef,      // coefficient memory word
  input  logic signed [DATA_W-1:0] x_in,      // in0: sample
  input  logic                     x_in_vld,
  output logic                     x_rdy,
  input  logic signed [ACC_W-1:0]  s_in,      // in1: partial sum
  input  logic                     s_in_vld,
  output logic signed [DATA_W-1:0] x_out,     // out0
  output logic                     x_out_vld,
  output logic signed [ACC_W-1:0]  s_out,     // out1
  output logic                     s_out_vld
);

  logic signed [DATA_W-1:0] d [N_TAPS];       // d[t] = t-th newest sample
  logic signed [ACC_W-1:0]  acc, prod, sum_in;
  logic [AW-1:0]            tap;
  logic                     busy, accept, last;
  logic [AW-1:0]            t_last;

  assign t_last    = AW'(taps - TW'(1));
  assign x_rdy     = en && !busy;
  assign accept    = x_rdy && x_in_vld;
  assign coef_addr = busy ? tap : '0;
  assign prod      = busy ? ACC_W'(d[tap]) * ACC_W'(coef) : ACC_W'(x_in) * ACC_W'(coef);
  assign last      = busy ? (tap == t_last) : (accept && t_last == '0);
  assign sum_in    = first ? '0 : s_in;

  always_ff @(posedge clk) begin
    if (!rst_n || !en) begin
      for (int k = 0; k < int'(N_TAPS); k++) d[k] <= '0;
      acc       <= '0;
      tap       <= '0;
      busy      <= 1'b0;
      x_out     <= '0;
      x_out_vld <= 1'b0;
      s_out     <= '0;
      s_out_vld <= 1'b0;
    end else begin
      x_out_vld <= 1'b0;
      s_out_vld <= 1'b0;
      if (accept) begin
        d[0] <= x_in;
        for (int k = 1; k < int'(N_TAPS); k++) d[k] <= d[k-1];
        x_out     <= d[t_last];
        x_out_vld <= 1'b1;
      end
      if (last) begin
        s_out     <= sum_in + (busy ? acc : '0) + prod;
        s_out_vld <= 1'b1;
        busy      <= 1'b0;
        tap       <= '0;
      end else if (accept) begin
        acc  <= prod;
        tap  <= AW'(1);
        busy <= 1'b1;
      end else if (busy) begin
        acc <= acc + prod;
        tap <= tap + AW'(1);
      end
    end
  end

  // a following PE's partial sum arrives in the clock of its last MAC
  always_ff @(posedge clk) begin
    if (rst_n && en && last && !first)
      assert (s_in_vld) else $error("partial sum missing at the last tap");
  end

endmodule
