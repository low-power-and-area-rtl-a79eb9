// tb_stream_mux: all 32 input combinations for both selections; the output
// pair must equal the selected input pair.
`timescale 1ps/1ps
module tb_stream_mux;
  import trng_pkg::*;
  stream_e sel;
  logic raw_bit, raw_valid, pp_bit, pp_valid, bit_o, valid_o;
  int checks = 0, failures = 0;

  stream_mux dut (.sel(sel), .raw_bit(raw_bit), .raw_valid(raw_valid), .pp_bit(pp_bit),
                  .pp_valid(pp_valid), .bit_o(bit_o), .valid_o(valid_o));

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic [4:0] b;
      b = 5'(v);
      sel = stream_e'(b[4]);
      {raw_bit, raw_valid, pp_bit, pp_valid} = b[3:0];
      #10;
      checks++;
      if ({bit_o, valid_o} != (b[4] ? {b[1], b[0]} : {b[3], b[2]})) begin
        failures++;
        $display("FAIL: in=%b out=%b%b", b, bit_o, valid_o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
