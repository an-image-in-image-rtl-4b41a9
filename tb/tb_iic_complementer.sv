// tb_iic_complementer: self-checking testbench of the controlled complementer.
//
// Random words with both values of tout: f must equal d for tout = 1 and the
// bitwise inverse of d for tout = 0.
module tb_iic_complementer;
  logic [15:0] d, f;
  logic        tout;
  int          checks = 0, failures = 0;

  iic_complementer dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      d    = 16'($urandom);
      tout = 1'($urandom);
      #1;
      for (int b = 0; b < 16; b++) begin
        checks++;
        if (f[b] !== (tout ? d[b] : !d[b])) begin
          failures++;
          $display("FAIL vector %0d bit %0d", i, b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
