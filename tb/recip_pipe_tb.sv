// recip_pipe_tb: feeds a new random divisor every clock (plus 0, 1 and the
// maximum) and checks q = min(floor(2^(F+FI)/d), 2^WI-1), that d comes back
// on d_out, and the latency of F+FI+1 clocks.
module recip_pipe_tb;
  localparam int DW = 11, F = 8, FI = 12, WI = 16;
  localparam int LAT = F + FI + 1;
  localparam int N   = 2000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid;
  logic [DW-1:0] d;
  logic out_valid;
  logic [WI-1:0] q;
  logic [DW-1:0] d_out;

  recip_pipe #(.DW(DW), .F(F), .FI(FI), .WI(WI)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  longint ds [$];
  int     ts [$];

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (in_valid) begin ds.push_back(longint'(d)); ts.push_back(cycle); end
    if (rst_n && out_valid) begin
      longint dv, e;
      int t;
      dv = ds.pop_front();
      t  = ts.pop_front();
      e  = (dv == 0) ? 65535 : (longint'(1) << (F + FI)) / dv;
      if (e > 65535) e = 65535;
      checks++;
      if (longint'(q) != e || longint'(d_out) != dv || cycle - t != LAT) begin
        failures++;
        if (failures < 10) $display("d=%0d q=%0d expected %0d latency=%0d", dv, q, e, cycle - t);
      end
    end
  end

  initial begin
    in_valid = 0; d = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < N; i++) begin
      @(posedge clk);
      in_valid <= (i % 7 != 3);   // a few idle clocks
      case (i)
        0: d <= '0;
        1: d <= DW'(1);
        2: d <= '1;
        default: d <= DW'($urandom >> (i % 10));
      endcase
    end
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (ds.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + LAT + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
