// tb_mode_ctrl: switch 8 puts the status word on the LA pins and the
// inverted version on the LEDs; otherwise the mode picks the diagnostic
// word.  Switch 7 replaces the L1A input by the event ends of the lowest
// live fiber of each group.
module tb_mode_ctrl;
  logic clk = 0, rst = 1;
  logic [3:0] sw_mode = 0;
  logic sw_fake_l1a = 0, sw_show_stat = 0, l1a_in = 0;
  logic [7:0] live, evt_end;
  logic [31:0] status, diag [4], la;
  logic [1:0] l1a_grp, exp_grp;
  logic [7:0] led;
  int checks = 0, failures = 0;

  mode_ctrl #(.NFIB(8), .VERSION(8'd25)) dut (.clk, .rst, .sw_mode, .sw_fake_l1a, .sw_show_stat,
    .l1a_in, .live, .evt_end, .status, .diag, .l1a_grp, .la, .led);

  always #5 clk = ~clk;

  function automatic logic lowest_end(logic [3:0] lv, logic [3:0] ev);
    for (int i = 0; i < 4; i++) if (lv[i]) return ev[i];
    return 1'b0;
  endfunction

  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int t = 0; t < 500; t++) begin
      sw_mode = 4'($urandom); sw_show_stat = $urandom_range(0, 1); sw_fake_l1a = $urandom_range(0, 1);
      l1a_in = $urandom_range(0, 1); live = 8'($urandom); evt_end = 8'($urandom);
      status = $urandom;
      for (int i = 0; i < 4; i++) diag[i] = $urandom;
      #1;
      checks++;
      if (la !== (sw_show_stat ? status : diag[sw_mode[1:0]]) ||
          led !== (sw_show_stat ? 8'hE6 : {4'h0, sw_mode})) begin
        failures++; $display("FAIL t=%0d la/led", t);
      end
      exp_grp = sw_fake_l1a ? {lowest_end(live[7:4], evt_end[7:4]), lowest_end(live[3:0], evt_end[3:0])}
                            : {2{l1a_in}};
      @(posedge clk); #1;
      checks++;
      if (l1a_grp !== exp_grp) begin failures++; $display("FAIL t=%0d l1a_grp=%b exp=%b", t, l1a_grp, exp_grp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
