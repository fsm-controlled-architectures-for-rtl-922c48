// tb_fir_tap_fu - self-checking test of the FIR function unit.
//
// Chains up to six units as a region would and runs several region sizes
// R = P+1 for a filter of N taps: R = 1 (one unit runs all taps), 2, 3 and 6
// (one tap per unit) for N = 6, and R = 2 for N = 5 (the last tap of the last
// unit has a zero coefficient). Each unit gets its share of the coefficients
// in its own memory model. Samples are offered back to back for most of the
// run and with random gaps for the rest. Every output of the last unit is
// compared with y[s] = sum_k a[k]*u[s-k]; the sample interval (T clocks when
// back to back) and the latency (P + T - 1 clocks from the edge that took
// u[s] to the edge that presents y[s]) are checked too.
module tb_fir_tap_fu;
  import inv_pkg::*;
  localparam int MAXR = 6, MAXT = 8, AW = 3, TW = 4, NS = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [MAXR-1:0] en;
  logic [TW-1:0]   taps;
  logic [AW-1:0]   addr [MAXR];
  logic signed [DATA_W-1:0] mem [MAXR][MAXT];
  logic signed [DATA_W-1:0] x [MAXR+1];
  logic                     xv [MAXR+1];
  logic signed [ACC_W-1:0]  s [MAXR+1];
  logic                     sv [MAXR+1];
  logic [MAXR-1:0]          rdy;
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  for (genvar j = 0; j < MAXR; j++) begin : g
    fir_tap_fu #(.N_TAPS(MAXT)) u (
      .clk, .rst_n, .en(en[j]), .first(j == 0), .taps,
      .coef_addr(addr[j]), .coef(mem[j][addr[j]]),
      .x_in(x[j]), .x_in_vld(xv[j]), .x_rdy(rdy[j]), .s_in(s[j]), .s_in_vld(sv[j]),
      .x_out(x[j+1]), .x_out_vld(xv[j+1]), .s_out(s[j+1]), .s_out_vld(sv[j+1]));
  end
  assign s[0]  = '0;
  assign sv[0] = 1'b0;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(int n, int r);
    int t = (n + r - 1) / r;
    logic signed [DATA_W-1:0] a [MAXR*MAXT];
    logic signed [DATA_W-1:0] u [NS];
    int take [NS];
    int n_in = 0, n_out = 0, last_take = -1;
    @(negedge clk);
    en = '0;
    xv[0] = 1'b0;
    taps = TW'(t);
    for (int k = 0; k < MAXR * MAXT; k++)
      a[k] = (k < n) ? DATA_W'($urandom_range(0, 60000)) : '0;
    for (int j = 0; j < MAXR; j++)
      for (int w = 0; w < MAXT; w++)
        mem[j][w] = (w < t) ? a[j * t + w] : DATA_W'($urandom_range(0, 60000));
    @(negedge clk);
    for (int j = 0; j < r; j++) en[j] = 1'b1;
    fork
      begin
        while (n_in < NS) begin
          if (n_in < 3 * NS / 4 || $urandom_range(0, 2) == 0) begin
            x[0] = DATA_W'($urandom_range(0, 65535));
            xv[0] = 1'b1;
          end else begin
            xv[0] = 1'b0;
          end
          @(posedge clk);
          if (xv[0] && rdy[0]) begin
            u[n_in] = x[0];
            take[n_in] = cyc;
            if (n_in > 0 && n_in < 3 * NS / 4)
              check($sformatf("N=%0d R=%0d sample interval %0d", n, r, cyc - last_take),
                    cyc - last_take == t);
            last_take = cyc;
            n_in++;
          end
          @(negedge clk);
        end
        xv[0] = 1'b0;
      end
      begin
        repeat (NS * (t + 3) + 20) begin
          @(posedge clk);
          if (sv[r]) begin
            longint e = 0;
            for (int k = 0; k < n; k++)
              if (n_out - k >= 0) e += longint'(a[k]) * longint'(u[n_out - k]);
            check($sformatf("N=%0d R=%0d y[%0d] = %0d, expected %0d", n, r, n_out, s[r], e),
                  n_out < n_in && longint'(s[r]) == e);
            check($sformatf("N=%0d R=%0d latency %0d", n, r, cyc - take[n_out]),
                  cyc - take[n_out] == (r - 1) + t - 1 + 1);
            n_out++;
          end
        end
      end
    join
    check($sformatf("N=%0d R=%0d output count %0d", n, r, n_out), n_out == NS);
  endtask

  initial begin
    en = '0; taps = TW'(1); x[0] = '0; xv[0] = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    run(6, 1);
    run(6, 2);
    run(6, 3);
    run(6, 6);
    run(5, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
