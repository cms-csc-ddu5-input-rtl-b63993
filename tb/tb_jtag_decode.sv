// tb_jtag_decode: every opcode must enable exactly its own register and
// route exactly that register's TDO; disabled means no enable and TDO low.
module tb_jtag_decode;
  logic [4:0]  op;
  logic        en;
  logic [31:0] tdo_bus, dvcenb;
  logic        tdo;
  int checks = 0, failures = 0;

  jtag_decode dut (.op, .en, .tdo_bus, .dvcenb, .tdo);

  initial begin
    for (int k = 0; k < 200; k++) begin
      op = 5'($urandom_range(0, 31));
      en = (k % 7) != 3;
      tdo_bus = $urandom;
      #1;
      checks++;
      if (dvcenb !== (en ? (32'd1 << op) : 32'd0) || tdo !== (en & tdo_bus[op])) begin
        failures++;
        $display("FAIL op=%0d en=%b dvcenb=%h tdo=%b", op, en, dvcenb, tdo);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
