// mcp3002_model: behavioural model of the SPI side of an MCP3002 10-bit ADC,
// for testbenches only (not synthesizable as written, no analog part).
//
// On the falling edge of cs_n a conversion starts. The model latches din on
// the first four rising clk edges (start, SGL/DIFF, ODD/SIGN, MSBF) and
// reports them in `cfg`. On the falling clk edge after the fourth rising edge
// it drives the null bit (0) and samples `code`; on the next ten falling edges
// it drives B9..B0, MSB first. dout is 0 outside a conversion. `conversions`
// counts the conversions whose configuration was read completely.
module mcp3002_model (
  input  logic       cs_n,
  input  logic       clk,
  input  logic       din,
  output logic       dout,
  input  logic [9:0] code,
  output logic [3:0] cfg,
  output int         conversions
);
  int         rises = 0;
  logic [9:0] held = '0;

  initial begin
    dout = 1'b0;
    cfg = '0;
    conversions = 0;
  end

  always @(negedge cs_n) rises = 0;
  always @(posedge cs_n) dout = 1'b0;

  always @(posedge clk) if (!cs_n) begin
    if (rises < 4) cfg[3 - rises] = din;
    rises++;
    if (rises == 4) conversions++;
  end

  always @(negedge clk) if (!cs_n) begin
    if (rises == 4) begin
      held = code;
      dout = 1'b0;
    end else if (rises >= 5 && rises <= 14) begin
      dout = held[14 - rises];
    end else begin
      dout = 1'b0;
    end
  end
endmodule
