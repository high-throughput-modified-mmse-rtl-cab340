// reswap_sc_tb: builds random transmitted vectors c = s x (16-QAM x, s_0 = 1,
// s_i = j^rot_i), shuffles them with a random permutation p the way the
// sorted decomposition would (c_sorted[k] = c[p(k)]), and checks that the
// block puts them back in antenna order and returns the bits
// {rot_3, rot_2, rot_1, Re index, Im index} one clock later.
module reswap_sc_tb;
  import hrsm_pkg::*;
  localparam int MODB = 4;
  localparam int L    = 1 << (MODB / 2);
  localparam int N    = 3000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  det_beat_t                  in_i;
  logic                       out_valid;
  sym_t  [NT-1:0]             out_sym;
  logic  [MODB+2*(NT-1)-1:0]  out_bits;
  perm_t                      out_perm;

  reswap_sc #(.MOD_BITS(MODB)) dut (.*);

  int checks = 0, failures = 0;
  logic [MODB+2*(NT-1)-1:0] eb [$];
  sym_t [NT-1:0]            es [$];
  int rots [4];

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [MODB+2*(NT-1)-1:0] b;
      sym_t [NT-1:0] s;
      b = eb.pop_front();
      s = es.pop_front();
      checks++;
      if (out_bits != b || out_sym != s) begin
        failures++;
        if (failures < 10) $display("bits %h expected %h", out_bits, b);
      end
    end
  end

  initial begin
    in_i = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < N; n++) begin
      det_beat_t b;
      int xr, xi, rot;
      int p [NT];
      sym_t [NT-1:0] c;
      logic [MODB+2*(NT-1)-1:0] bits;
      xr = $urandom % L; xi = $urandom % L;
      bits = '0;
      bits[MODB-1:MODB/2] = xr[MODB/2-1:0];
      bits[MODB/2-1:0]    = xi[MODB/2-1:0];
      c[0].re = LVW'(2 * xr - L + 1);
      c[0].im = LVW'(2 * xi - L + 1);
      for (int a = 1; a < NT; a++) begin
        rot = $urandom % 4;
        rots[rot]++;
        bits[MODB + 2*a - 1 -: 2] = rot[1:0];
        case (rot)
          0: c[a] = c[0];
          1: begin c[a].re = -c[0].im; c[a].im =  c[0].re; end
          2: begin c[a].re = -c[0].re; c[a].im = -c[0].im; end
          default: begin c[a].re = c[0].im; c[a].im = -c[0].re; end
        endcase
      end
      for (int k = 0; k < NT; k++) p[k] = k;
      p.shuffle();
      b = '0;
      b.valid = 1'b1;
      for (int k = 0; k < NT; k++) begin
        b.perm[k] = PW'(p[k]);
        b.c[k]    = c[p[k]];
      end
      eb.push_back(bits);
      es.push_back(c);
      in_i <= b;
      @(posedge clk);
    end
    in_i <= '0;
    repeat (5) @(posedge clk);
    checks++;
    if (eb.size() != 0 || rots[0] == 0 || rots[1] == 0 || rots[2] == 0 || rots[3] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
