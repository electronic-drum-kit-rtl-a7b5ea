// write_eeprom: copy the kick drum samples from kick_rom into a parallel EEPROM.
//
// A stand-alone FPGA program for a 32k x 8 parallel EEPROM (AT28C256 class).
// It walks addr from 0 to ADDR_LIMIT, one byte per BYTE_PERIOD+1 clk cycles. A
// cycle counter runs from 0 to BYTE_PERIOD; while it is above WE_START and below
// BYTE_PERIOD the write strobe not_WE is held low (the EEPROM latches the
// address on its falling edge and the data on its rising edge), and when it
// reaches BYTE_PERIOD the address steps on and the counter restarts. The data
// byte comes from kick_rom at addr[12:0]; it settles one cycle after each address
// change, long before the next strobe. The slow pace (25 ms per byte at the
// default 40 MHz clock) leaves the EEPROM's internal write cycle ample time.
//
// Interface: not_CE is held low and not_OE high (chip selected, outputs off).
// WRITE_LED is high while a strobe is low; DONE_LED goes high, and not_WE stays
// high, once every address up to ADDR_LIMIT has been written.
//
// Timing: not_WE, WRITE_LED and DONE_LED are registered, one cycle behind the
// counter. The whole copy takes (ADDR_LIMIT+1) * (BYTE_PERIOD+1) cycles.
//
// Following the original design: the counter thresholds 800000 and 1000000,
// the address limit 7754, the control levels and the LEDs. This design's own
// choices: the synchronous reset and the thresholds as parameters.
module write_eeprom #(
  parameter int unsigned ADDR_LIMIT  = drum_pkg::KICK_SAMPLES - 1,
  parameter int unsigned BYTE_PERIOD = 1_000_000,
  parameter int unsigned WE_START    = 800_000
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        not_CE,
  output logic        not_WE,
  output logic        not_OE,
  output logic [14:0] addr,
  output logic [7:0]  data,
  output logic        WRITE_LED,
  output logic        DONE_LED
);

  localparam int unsigned CW = $clog2(BYTE_PERIOD + 1);

  logic [CW-1:0] count;
  logic          busy;

  assign busy = ({17'd0, addr} <= 32'(ADDR_LIMIT));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count     <= '0;
      addr      <= '0;
      not_WE    <= 1'b1;
      WRITE_LED <= 1'b0;
      DONE_LED  <= 1'b0;
    end else if (busy) begin
      if (count == CW'(BYTE_PERIOD)) begin
        count <= '0;
        addr  <= addr + 1'b1;
      end else begin
        count <= count + 1'b1;
      end
      if (count > CW'(WE_START) && count < CW'(BYTE_PERIOD)) begin
        not_WE    <= 1'b0;
        WRITE_LED <= 1'b1;
      end else begin
        not_WE    <= 1'b1;
        WRITE_LED <= 1'b0;
      end
      DONE_LED <= 1'b0;
    end else begin
      not_WE    <= 1'b1;
      WRITE_LED <= 1'b0;
      DONE_LED  <= 1'b1;
    end
  end

  assign not_CE = 1'b0;
  assign not_OE = 1'b1;

  kick_rom u_kick_rom (
    .address(addr[12:0]),
    .clock  (clk),
    .q      (data)
  );

endmodule
