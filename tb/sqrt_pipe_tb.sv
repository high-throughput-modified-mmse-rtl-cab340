// sqrt_pipe_tb: feeds a new random radicand every clock (plus the extremes
// 0, 1 and all ones) and checks that each root r satisfies
// r^2 <= x < (r+1)^2 and arrives exactly IN_W/2 clocks later.
module sqrt_pipe_tb;
  localparam int IN_W = 28;
  localparam int LAT  = IN_W / 2;
  localparam int N    = 2000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid;
  logic [IN_W-1:0] x;
  logic out_valid;
  logic [IN_W/2-1:0] root;

  sqrt_pipe #(.IN_W(IN_W)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  longint xs [$];
  int     ts [$];

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (in_valid) begin xs.push_back(longint'(x)); ts.push_back(cycle); end
    if (rst_n && out_valid) begin
      longint xv, r;
      int t;
      xv = xs.pop_front();
      t  = ts.pop_front();
      r  = longint'(root);
      checks++;
      if (!(r * r <= xv && (r + 1) * (r + 1) > xv) || cycle - t != LAT) begin
        failures++;
        if (failures < 10) $display("x=%0d root=%0d latency=%0d", xv, r, cycle - t);
      end
    end
  end

  initial begin
    in_valid = 0; x = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < N; i++) begin
      @(posedge clk);
      in_valid <= 1'b1;
      case (i)
        0: x <= '0;
        1: x <= IN_W'(1);
        2: x <= '1;
        default: x <= IN_W'({$urandom, $urandom} >> (i % IN_W));
      endcase
    end
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (xs.size() != 0) failures++;
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
