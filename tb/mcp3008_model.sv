// Behavioural model of the SPI side of an MCP3008 10-bit ADC (testbench use).
//
// After CS falls, the first rising SCLK edge with DIN high is the start bit;
// the next four rising edges clock in SGL/DIFF, D2, D1, D0 (kept in cmd). The
// input value is sampled on the 5th rising edge counted from the start bit.
// On the falling edge after the 6th rising edge DOUT goes to the null bit,
// and on the next ten falling edges it shifts out B9..B0, MSB first. A frame
// counts as complete once B0 is on DOUT. Analog behaviour, timing limits and
// the high-impedance state of DOUT are not modelled (DOUT idles low).
module mcp3008_model (
  input  logic              cs,      // active low
  input  logic              sclk,
  input  logic              din,
  output logic              dout,
  input  logic [9:0]        value,   // conversion result to return
  output logic [3:0]        cmd,     // SGL/DIFF, D2, D1, D0 of the last frame
  output int unsigned       frames   // completed frames
);
  int unsigned rises;
  logic        started;
  logic [9:0]  held;
  logic [3:0]  cmd_sr;

  initial begin
    dout = 1'b0; cmd = '0; frames = 0; rises = 0; started = 1'b0; held = '0; cmd_sr = '0;
  end

  always @(negedge cs) begin
    rises   = 0;
    started = 1'b0;
    dout    = 1'b0;
  end

  always @(posedge sclk) begin
    if (!cs) begin
      if (!started) begin
        if (din) begin
          started = 1'b1;
          rises   = 1;
        end
      end else begin
        rises++;
        if (rises >= 2 && rises <= 5) cmd_sr = {cmd_sr[2:0], din};
        if (rises == 5) begin
          held = value;
          cmd  = cmd_sr;
        end
      end
    end
  end

  always @(negedge sclk) begin
    if (!cs && started) begin
      if (rises == 6) dout = 1'b0;
      else if (rises >= 7 && rises <= 16) begin
        dout = held[16 - rises];
        if (rises == 16) frames++;
      end
    end
  end
endmodule
