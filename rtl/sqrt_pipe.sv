// sqrt_pipe: fully pipelined integer square root, root = floor(sqrt(x)).
// It stands in for the square-root core of the sorted QR decomposition,
// which computes R(k,k) = sqrt(norm). One result bit is decided per stage by
// the digit-by-digit (restoring) method: bring down two radicand bits,
// compare the partial remainder with 4*root+1, subtract if it fits. Each
// stage is one compare-subtract, so the path between registers stays short.
// Interface: in_valid/x enter every clock; out_valid/root leave LAT = IN_W/2
// clocks later (one result per clock). IN_W must be even.
module sqrt_pipe #(
  parameter int IN_W = 28
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [IN_W-1:0]     x,
  output logic                out_valid,
  output logic [IN_W/2-1:0]   root
);
  localparam int LAT = IN_W / 2;
  localparam int RW  = LAT + 2;

  logic [IN_W-1:0] xs  [LAT+1];
  logic [RW-1:0]   rem [LAT+1];
  logic [LAT-1:0]  rt  [LAT+1];
  logic            vl  [LAT+1];

  assign xs[0]  = x;
  assign rem[0] = '0;
  assign rt[0]  = '0;
  assign vl[0]  = in_valid;

  for (genvar s = 0; s < LAT; s++) begin : g_stage
    logic [RW-1:0] r_in, trial;
    logic          fits;
    always_comb begin
      r_in  = {rem[s][RW-3:0], xs[s][IN_W-1 -: 2]};
      trial = {rt[s], 2'b01};
      fits  = (r_in >= trial);
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        xs[s+1] <= '0; rem[s+1] <= '0; rt[s+1] <= '0; vl[s+1] <= 1'b0;
      end else begin
        xs[s+1]  <= xs[s] << 2;
        rem[s+1] <= fits ? (r_in - trial) : r_in;
        rt[s+1]  <= {rt[s][LAT-2:0], fits};
        vl[s+1]  <= vl[s];
      end
    end
  end

  assign out_valid = vl[LAT];
  assign root      = rt[LAT];

  initial assert (IN_W % 2 == 0) else $error("sqrt_pipe: IN_W must be even");
endmodule
