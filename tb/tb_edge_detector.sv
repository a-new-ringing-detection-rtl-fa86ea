// tb_edge_detector: streams random lines (with plateaus so that both edge and
// non-edge pixels occur) through edge_detector with random gaps and random
// thresholds, rebuilds the edge map from its two write ports and compares it
// with the reference central-difference map. Also checks that every pixel of
// the line gets exactly one edge decision.
module tb_edge_detector;
  import scaler_pkg::*;
  import scaler_ref_pkg::*;

  localparam int MAX_W = 64;
  localparam int IW = $clog2(MAX_W);

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_last = 0;
  logic [IW-1:0] in_idx = '0;
  pix_t in_pix = '0, thresh = '0;
  logic e0_we, e0_val, e1_we, e1_val;
  logic [IW-1:0] e0_idx, e1_idx;
  int checks = 0, failures = 0;

  edge_detector #(.MAX_W(MAX_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int got [MAX_W];
  int hits [MAX_W];

  always @(posedge clk) begin
    if (e0_we) begin got[e0_idx] = e0_val; hits[e0_idx]++; end
    if (e1_we) begin got[e1_idx] = e1_val; hits[e1_idx]++; end
  end

  initial begin
    int x[$];
    bit e[$];
    int w, v, nedge;
    nedge = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int line = 0; line < 40; line++) begin
      w = (line == 0) ? 1 : (line == 1) ? 2 : 1 + ($urandom % MAX_W);
      thresh = pix_t'($urandom % 40);
      x = {};
      v = $urandom % 256;
      for (int i = 0; i < w; i++) begin
        if ($urandom % 4 == 0) v = $urandom % 256;
        x.push_back(v);
      end
      for (int i = 0; i < MAX_W; i++) begin got[i] = -1; hits[i] = 0; end
      for (int i = 0; i < w; i++) begin
        while ($urandom % 3 == 0) begin
          in_valid <= 0;
          @(posedge clk);
        end
        in_valid <= 1;
        in_idx   <= IW'(i);
        in_pix   <= pix_t'(x[i]);
        in_last  <= (i == w - 1);
        @(posedge clk);
      end
      in_valid <= 0;
      in_last  <= 0;
      @(posedge clk);
      ref_edges(x, int'(thresh), e);
      for (int i = 0; i < w; i++) begin
        checks++;
        if (hits[i] != 1 || got[i] != int'(e[i])) begin
          failures++;
          if (failures < 10)
            $display("line %0d px %0d: got %0d (%0d writes) exp %0d", line, i, got[i], hits[i], e[i]);
        end
        nedge += e[i];
      end
    end
    checks++;
    if (nedge == 0) begin failures++; $display("no edge ever seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
