// tb_byte_decoder: exhaustive check of the shared 8-to-256 lane decoders.
// Every byte value is put on every lane (the other lanes carry random
// values); each lane's output must be exactly the one-hot code of its byte.
module tb_byte_decoder;
  import dpf_pkg::*;
  word_t     data;
  lane_dec_t dec;
  int checks = 0, failures = 0;

  byte_decoder #(.LANES(BUS_BYTES)) dut (.data(data), .dec(dec));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < BUS_BYTES; l++)
      for (int v = 0; v < 256; v++) begin
        data = word_t'($urandom);
        data[l] = 8'(v);
        #1;
        for (int m = 0; m < BUS_BYTES; m++) begin
          logic [255:0] exp;
          exp = '0;
          exp[data[m]] = 1'b1;
          checks++;
          if (dec[m] !== exp) begin
            failures++;
            if (failures < 10) $display("lane %0d byte %02h: wrong decode", m, data[m]);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
