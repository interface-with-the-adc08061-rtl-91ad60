// tb_wattmeter_ref_pkg: reference values for the wattmeter testbenches.
//
// ref_product() is the plain signed product of two 8-bit two's-complement samples
// and ref_dac() the byte the DAC should receive: product bits 14..7. The designs
// keep an accumulator only as wide as a sample, as the original circuit does, so a
// multiplicand of 0x80 overflows it; for that one multiplicand ref_dac() works the
// expected byte out with a behavioural Booth loop that keeps the same 8-bit
// accumulator, written independently of the RTL.
package tb_wattmeter_ref_pkg;

  function automatic logic [15:0] ref_product(input logic [7:0] a, input logic [7:0] b);
    int p;
    p = int'($signed(a)) * int'($signed(b));
    return p[15:0];
  endfunction

  // Booth loop with a sample-wide accumulator (bit-exact to the hardware).
  function automatic logic [15:0] booth8_product(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] acc, q;
    logic       qm1;
    acc = '0; q = b; qm1 = 1'b0;
    for (int i = 0; i < 8; i++) begin
      if ({q[0], qm1} == 2'b10) acc = acc - a;
      else if ({q[0], qm1} == 2'b01) acc = acc + a;
      {acc, q, qm1} = {acc[7], acc, q};
    end
    return {acc, q};
  endfunction

  function automatic logic [7:0] ref_dac(input logic [7:0] a, input logic [7:0] b);
    logic [15:0] p;
    p = (a == 8'h80) ? booth8_product(a, b) : ref_product(a, b);
    return p[14:7];
  endfunction

endpackage
