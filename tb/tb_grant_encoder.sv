// tb_grant_encoder: exhaustive check of the one-hot to binary encoder for
// 4 and 8 inputs, against the bit position of the single set bit.
module tb_grant_encoder;
  int checks = 0, failures = 0;

  logic [3:0] oh4;  logic [1:0] idx4;  logic any4;
  logic [7:0] oh8;  logic [2:0] idx8;  logic any8;

  grant_encoder #(.N(4)) dut4 (.onehot(oh4), .idx(idx4), .any(any4));
  grant_encoder #(.N(8)) dut8 (.onehot(oh8), .idx(idx8), .any(any8));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    oh4 = '0; oh8 = '0; #1;
    check(any4 == 1'b0 && idx4 == 2'd0, "N=4 zero");
    check(any8 == 1'b0 && idx8 == 3'd0, "N=8 zero");
    for (int i = 0; i < 4; i++) begin
      oh4 = 4'b1 << i; #1;
      check(any4 && idx4 == 2'(i), $sformatf("N=4 bit %0d gave %0d", i, idx4));
    end
    for (int i = 0; i < 8; i++) begin
      oh8 = 8'b1 << i; #1;
      check(any8 && idx8 == 3'(i), $sformatf("N=8 bit %0d gave %0d", i, idx8));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
