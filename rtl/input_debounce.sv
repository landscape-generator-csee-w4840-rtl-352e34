// input_debounce: filters bouncing push buttons and switches.
//
// W raw inputs, sampled on clk. The filtered output of a bit follows its
// raw input only after the raw input has held a new value for CYCLES
// consecutive clocks (500 clocks, 20 us at 25 MHz, by default); shorter
// glitches are ignored. Each bit has its own counter. The 500-clock
// interval follows the report; per-bit counters are this design's choice
// (a single counter shared by all inputs would let one input's bounce
// delay another). Outputs reset to RESET_VAL.
module input_debounce #(
  parameter int           W         = 4,
  parameter int           CYCLES    = 500,
  parameter logic [W-1:0] RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] raw,
  output logic [W-1:0] clean
);

  localparam int CW = $clog2(CYCLES + 1);

  logic [W-1:0] sync1, sync2;   // two-flop synchroniser

  always_ff @(posedge clk) begin
    if (rst) begin
      sync1 <= RESET_VAL;
      sync2 <= RESET_VAL;
    end else begin
      sync1 <= raw;
      sync2 <= sync1;
    end
  end

  for (genvar i = 0; i < W; i++) begin : g_bit
    logic [CW-1:0] cnt;
    always_ff @(posedge clk) begin
      if (rst) begin
        cnt      <= '0;
        clean[i] <= RESET_VAL[i];
      end else if (sync2[i] == clean[i]) begin
        cnt <= '0;
      end else if (int'(cnt) == CYCLES - 1) begin
        cnt      <= '0;
        clean[i] <= sync2[i];
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
