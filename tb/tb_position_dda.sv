// tb_position_dda: runs position_dda over many random L/M/width triples (up
// and down scaling, integer and fractional ratios) with random stalls on adv,
// and checks each output's k = floor(m*M/L), r = m*M mod L, the quantised
// phase, the last flag and the number of outputs, ceil(W*L/M). With adv held
// high it also checks the rate: one output per clock, valid from the cycle
// after start.
module tb_position_dda;
  import scaler_pkg::*;

  localparam int MAX_W = 256;
  localparam int IW = $clog2(MAX_W);

  logic clk = 0, rst_n = 0, start = 0, adv = 0;
  logic [SCALE_W-1:0] cfg_l = 1, cfg_m = 1;
  logic [IW:0] width = '0;
  logic valid, last;
  logic [IW-1:0] k;
  logic [SCALE_W-1:0] r;
  logic [PHASE_BITS-1:0] phase;
  int checks = 0, failures = 0;

  position_dda #(.MAX_W(MAX_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int l, int m, int w, bit stalls);
    longint mi;
    int n_exp, cyc;
    bit ok;
    n_exp = int'((longint'(w) * l + m - 1) / m);
    @(negedge clk);
    cfg_l = SCALE_W'(l); cfg_m = SCALE_W'(m); width = (IW+1)'(w); start = 1;
    @(negedge clk);
    start = 0;
    cfg_l = SCALE_W'($urandom); cfg_m = SCALE_W'($urandom);  // sampled at start only
    mi = 0; cyc = 0;
    while (1) begin
      adv = stalls ? ($urandom % 3 != 0) : 1'b1;
      #1;
      if (!valid) break;
      if (adv) begin
        ok = (int'(k) == int'((mi * m) / l)) && (int'(r) == int'((mi * m) % l)) &&
             (int'(phase) == int'(((mi * m) % l) * 64 / l)) &&
             (last == (mi == n_exp - 1));
        checks++;
        if (!ok) begin
          failures++;
          if (failures < 10) $display("L%0d M%0d W%0d m%0d: k%0d r%0d ph%0d last%0b", l, m, w, mi, k, r, phase, last);
        end
        mi++;
      end
      @(negedge clk);
      cyc++;
    end
    adv = 0;
    checks++;
    if (mi != n_exp) begin failures++; $display("L%0d M%0d W%0d: %0d outputs, exp %0d", l, m, w, mi, n_exp); end
    if (!stalls) begin
      checks++;
      if (cyc != n_exp) begin failures++; $display("rate: %0d cycles for %0d outputs", cyc, n_exp); end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(5, 2, 256, 0);     // 2.5x up
    run(8, 3, 240, 0);     // 720 -> 1920 ratio
    run(2, 3, 255, 1);     // 1920 -> 1280 ratio
    run(1, 4, 17, 0);      // integer down
    run(3, 3, 1, 0);
    run(255, 254, 100, 1);
    run(1, 255, 256, 0);
    for (int i = 0; i < 60; i++)
      run(1 + $urandom % 255, 1 + $urandom % 255, 1 + $urandom % MAX_W, i[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
