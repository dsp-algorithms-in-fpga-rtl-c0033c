// ou_div: iterative signed divider, the "more complicated operation" that
// only some Operational Units carry.
//
// A pulse on `start` latches the dividend a and divisor b and begins a
// restoring division of the magnitudes, one quotient bit per cycle: with
// `start` high in cycle 0, `done` and the quotient appear in cycle
// DATA_W+1. `busy` is high while it works; `done` then stays high, with the quotient on `q`, until `clear`
// (or a new `start`). The quotient is truncated toward zero. Division by
// zero returns the largest positive value for a >= 0 and the most negative
// value for a < 0.
//
// The architecture only names division as an example of a multi-cycle
// operation; the algorithm, latency and divide-by-zero result are this
// design's own choice.
module ou_div #(
  parameter int DATA_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              clear,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  output logic              busy,
  output logic              done,
  output logic [DATA_W-1:0] q
);
  localparam int CNT_W = $clog2(DATA_W + 1);

  typedef enum logic [1:0] {S_IDLE, S_BUSY, S_DONE} state_e;
  state_e state;

  logic [DATA_W-1:0] dvd, dvs, quo;   // magnitudes and quotient bits
  logic [DATA_W:0]   rem;
  logic [CNT_W-1:0]  cnt;
  logic              neg, dz, a_neg;
  logic [DATA_W:0]   rem_sh, rem_sub;

  assign rem_sh  = {rem[DATA_W-1:0], dvd[DATA_W-1]};
  assign rem_sub = rem_sh - {1'b0, dvs};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      dvd <= '0; dvs <= '0; quo <= '0; rem <= '0; cnt <= '0;
      neg <= 1'b0; dz <= 1'b0; a_neg <= 1'b0;
    end else if (start) begin
      state <= S_BUSY;
      dvd   <= a[DATA_W-1] ? -a : a;
      dvs   <= b[DATA_W-1] ? -b : b;
      neg   <= a[DATA_W-1] ^ b[DATA_W-1];
      a_neg <= a[DATA_W-1];
      dz    <= (b == '0);
      quo   <= '0;
      rem   <= '0;
      cnt   <= CNT_W'(DATA_W);
    end else begin
      unique case (state)
        S_BUSY: begin
          dvd <= dvd << 1;
          if (!rem_sub[DATA_W]) begin
            rem <= rem_sub;
            quo <= {quo[DATA_W-2:0], 1'b1};
          end else begin
            rem <= rem_sh;
            quo <= {quo[DATA_W-2:0], 1'b0};
          end
          cnt <= cnt - 1'b1;
          if (cnt == CNT_W'(1)) state <= S_DONE;
        end
        S_DONE:  if (clear) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state == S_BUSY);
  assign done = (state == S_DONE);

  always_comb begin
    if (dz)       q = a_neg ? {1'b1, {(DATA_W-1){1'b0}}} : {1'b0, {(DATA_W-1){1'b1}}};
    else if (neg) q = -quo;
    else          q = quo;
  end

endmodule
