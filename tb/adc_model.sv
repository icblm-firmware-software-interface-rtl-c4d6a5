// adc_model: behavioural model of the four ADCs of the PICO4 card as seen by
// the SPI readout: on the rising CNV edge each channel loads its next 20-bit
// value (value[c] + n*step[c] for conversion n); the MSB is driven on SDO and
// the word shifts left on every falling SCK edge.
module adc_model (
  input  logic        cnv,
  input  logic        sck,
  output logic [3:0]  sdo
);
  logic [19:0] base [4];
  logic [19:0] step [4];
  logic [19:0] sr [4];
  int          n;
  initial begin
    n = 0;
    for (int c = 0; c < 4; c++) begin base[c] = 20'(c * 20'h11111 + 5); step[c] = 20'(3 + c); sr[c] = '0; end
  end
  // value of conversion k on channel c
  function automatic logic [19:0] value(input int c, input int k);
    return base[c] + 20'(k) * step[c];
  endfunction
  // conversion number that produced value v on channel c
  function automatic int index_of(input int c, input logic [19:0] v);
    return int'(20'(v - base[c])) / int'(step[c]);
  endfunction
  always @(posedge cnv) begin
    for (int c = 0; c < 4; c++) sr[c] = value(c, n);
    n++;
  end
  always @(negedge sck) for (int c = 0; c < 4; c++) sr[c] = sr[c] << 1;
  always_comb for (int c = 0; c < 4; c++) sdo[c] = sr[c][19];
endmodule
