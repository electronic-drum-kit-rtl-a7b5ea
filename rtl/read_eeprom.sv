// read_eeprom: step slowly through the EEPROM so its contents can be checked by eye.
//
// A stand-alone FPGA program that reads a 32k x 8 parallel EEPROM in address
// order. A free-running counter of ADDR_W+STEP_LOG2 bits supplies the address
// from its top ADDR_W bits, so each address is held for 2**STEP_LOG2 clk cycles
// (about 1.7 s at 40 MHz with the default 26) and the byte the EEPROM returns is
// shown on LEDs through data_out. After the last address the counter wraps to 0.
//
// Interface: not_CE and not_OE are held low and not_WE high (chip selected,
// outputs on, never writing); data_in is the EEPROM data bus, data_out drives
// the LEDs with it unchanged.
//
// Timing: addr is registered (counter bits); data_out follows data_in
// combinationally.
//
// Following the original design: the 41-bit counter, address = counter[40:26],
// the fixed control levels and the data-to-LED path. This design's own choices:
// the synchronous reset and the two widths as parameters.
module read_eeprom #(
  parameter int unsigned ADDR_W    = 15,
  parameter int unsigned STEP_LOG2 = 26
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [7:0]        data_in,
  output logic [ADDR_W-1:0] addr,
  output logic [7:0]        data_out,
  output logic              not_CE,
  output logic              not_OE,
  output logic              not_WE
);

  logic [ADDR_W+STEP_LOG2-1:0] counter;

  always_ff @(posedge clk) begin
    if (!rst_n) counter <= '0;
    else        counter <= counter + 1'b1;
  end

  assign addr     = counter[ADDR_W+STEP_LOG2-1:STEP_LOG2];
  assign data_out = data_in;
  assign not_CE   = 1'b0;
  assign not_OE   = 1'b0;
  assign not_WE   = 1'b1;

endmodule
