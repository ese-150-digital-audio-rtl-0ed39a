// write_decoder: the write-select half of a memory. Turns a write address into one-hot
// register enables, all gated by the write request: w[k] = write & (wa == k). For the
// four-entry case this is w0 = write & !wa[1] & !wa[0] ... w3 = write & wa[1] & wa[0].
// Combinational. AW sets the address width (2**AW outputs).
module write_decoder #(
  parameter int unsigned AW = 2
) (
  input  logic              write,
  input  logic [AW-1:0]     wa,
  output logic [2**AW-1:0]  w
);
  always_comb
    for (int k = 0; k < 2**AW; k++)
      w[k] = write && (wa == AW'(k));
endmodule
