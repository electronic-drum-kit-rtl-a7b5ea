// at28c256_model: behavioural model of a 32k x 8 parallel EEPROM, for testbenches.
//
// Write: with not_CE low and not_OE high, the address is latched on the falling
// edge of not_WE and the data on its rising edge, which stores the byte.
// Read: with not_CE and not_OE low and not_WE high, q shows the byte at addr;
// otherwise q is 0 (this two-state model has no high-impedance bus). Internal
// write-cycle time is not modelled. n_writes counts stored bytes.
module at28c256_model (
  input  logic        not_CE,
  input  logic        not_OE,
  input  logic        not_WE,
  input  logic [14:0] addr,
  input  logic [7:0]  d,
  output logic [7:0]  q
);
  logic [7:0]  mem [32768];
  logic [14:0] wr_addr;
  int          n_writes = 0;

  initial foreach (mem[i]) mem[i] = 8'hFF;  // erased

  always @(negedge not_WE) if (!not_CE && not_OE) wr_addr = addr;
  always @(posedge not_WE) if (!not_CE && not_OE) begin
    mem[wr_addr] = d;
    n_writes++;
  end

  assign q = (!not_CE && !not_OE && not_WE) ? mem[addr] : 8'h00;
endmodule
