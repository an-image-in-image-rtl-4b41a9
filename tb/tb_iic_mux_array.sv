// tb_iic_mux_array: self-checking testbench of the 16-way 2:1 multiplexer.
//
// Applies random words and both select values and checks every output bit.
module tb_iic_mux_array;
  logic [15:0] d1, d2, d;
  logic        sel_d1;
  int          checks = 0, failures = 0;

  iic_mux_array dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      d1     = 16'($urandom);
      d2     = 16'($urandom);
      sel_d1 = 1'(i);
      #1;
      for (int b = 0; b < 16; b++) begin
        checks++;
        if (d[b] !== (sel_d1 ? d1[b] : d2[b])) begin
          failures++;
          $display("FAIL vector %0d bit %0d", i, b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
