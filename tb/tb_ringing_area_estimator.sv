// tb_ringing_area_estimator: writes random sparse edge maps into both line
// slots through the two write ports, then reads every position of each slot
// and compares edge_o and ring_o with the reference dilation-XOR map. Slot 1
// is written while slot 0 is read, as the scaler does.
module tb_ringing_area_estimator;
  import scaler_ref_pkg::*;

  localparam int MAX_W = 64;
  localparam int IW = $clog2(MAX_W);
  localparam int DIL = 2;

  logic clk = 0;
  logic wslot = 0, rslot = 0;
  logic e0_we = 0, e0_val = 0, e1_we = 0, e1_val = 0;
  logic [IW-1:0] e0_idx = '0, e1_idx = '0, ridx = '0;
  logic [IW:0] rwidth = '0;
  logic edge_o, ring_o;
  int checks = 0, failures = 0, nring = 0;

  ringing_area_estimator #(.MAX_W(MAX_W), .SLOTS(2), .DIL(DIL)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit maps [2][$];
  int widths [2];

  task automatic make_map(int s);
    widths[s] = 1 + ($urandom % MAX_W);
    maps[s] = {};
    for (int i = 0; i < widths[s]; i++) maps[s].push_back(($urandom % 9) == 0);
  endtask

  // Writes map s into slot s, two entries per cycle (ports 0 and 1).
  task automatic write_map(int s);
    wslot <= s[0];
    for (int i = 0; i < widths[s]; i += 2) begin
      e0_we <= 1; e0_idx <= IW'(i); e0_val <= maps[s][i];
      e1_we <= (i + 1 < widths[s]); e1_idx <= IW'(i + 1);
      e1_val <= (i + 1 < widths[s]) ? maps[s][i + 1] : 1'b0;
      @(posedge clk);
    end
    e0_we <= 0; e1_we <= 0;
  endtask

  task automatic check_map(int s);
    bit rg[$];
    ref_ring(maps[s], DIL, rg);
    rslot  = s[0];
    rwidth = (IW+1)'(widths[s]);
    for (int i = 0; i < widths[s]; i++) begin
      ridx = IW'(i);
      #1;
      checks++;
      if (edge_o !== maps[s][i] || ring_o !== rg[i]) begin
        failures++;
        if (failures < 10) $display("slot %0d idx %0d: edge %0b/%0b ring %0b/%0b",
                                    s, i, edge_o, maps[s][i], ring_o, rg[i]);
      end
      nring += ring_o;
    end
  endtask

  initial begin
    @(posedge clk);
    for (int round = 0; round < 20; round++) begin
      make_map(0);
      write_map(0);
      make_map(1);
      fork
        write_map(1);
        check_map(0);
      join
      @(posedge clk);
      check_map(1);
    end
    checks++;
    if (nring == 0) begin failures++; $display("no ringing pixel seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
