// ou_regfile: the local registers of an Operational Unit, which together
// with those of all other OUs form the distributed data memory holding
// intermediate results.
//
// NREG words of DATA_W bits built from flip-flops, one write port and all
// words visible at once (the two input multiplexers pick from them). A
// write with `we` lands at the clock edge and is readable the next cycle.
// All words reset to zero. Size and reset value are this design's choice.
module ou_regfile #(
  parameter int DATA_W = 16,
  parameter int NREG   = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    we,
  input  logic [$clog2(NREG)-1:0] waddr,
  input  logic [DATA_W-1:0]       wdata,
  output logic [DATA_W-1:0]       rdata [NREG]
);
  logic [DATA_W-1:0] r [NREG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) r[i] <= '0;
    end else if (we) begin
      r[waddr] <= wdata;
    end
  end

  assign rdata = r;

endmodule
