// piso_4x1: four-to-one parallel-in serial-out primitive.
//
// An AND-OR selector: the pin shows data[k] while count[k] is high.  count is
// one-hot and changes on the falling system-clock edge, so each bit is on the
// pin around one rising edge of sipo_clk, when the neighbouring chip's SIPO
// samples it.  Combinational.
module piso_4x1 (
  input  logic [3:0] count,
  input  logic [3:0] data,
  output logic       q
);
  assign q = |(data & count);
endmodule
