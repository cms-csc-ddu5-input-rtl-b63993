// tb_fwft_fifo: random writes and reads against a queue model at the full
// 1024-word depth: every word read must be the oldest one written, the
// almost-full flag must rise at 1024-7 words, full must stop writes, and a
// word written into an empty FIFO must be readable two clocks later.
module tb_fwft_fifo;
  localparam int DEPTH = 1024;
  logic clk = 0, rst = 1;
  logic wen = 0, rd_en = 0;
  logic [35:0] din = '0, dout;
  logic empty, full, paf;
  logic [$clog2(DEPTH+1):0] words;
  logic [35:0] model [$];
  int checks = 0, failures = 0;

  fwft_fifo #(.DEPTH(DEPTH)) dut (.clk, .rst, .wen, .din, .rd_en, .dout, .empty, .full, .paf, .words);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  // One clock: drive, sample, update the model.
  task automatic step(input bit w, input bit r);
    wen = w; din = {$urandom, 4'($urandom)}; rd_en = r;
    #1;
    if (rd_en && !empty) begin
      check(model.size() > 0, "read with empty model");
      if (model.size() > 0) begin
        check(dout == model[0], $sformatf("data %h exp %h", dout, model[0]));
        void'(model.pop_front());
      end
    end
    if (wen && !full) model.push_back(din);
    @(posedge clk); #1;
    check(int'(words) == model.size(), $sformatf("words %0d exp %0d", words, model.size()));
    check(paf == (model.size() >= DEPTH - 7), "paf");
  endtask

  initial begin
    @(posedge clk); #1 rst = 0;
    check(empty && !full && words == 0, "reset state");
    // latency
    step(1, 0);
    check(empty, "empty one clock after write");
    step(0, 0);
    check(!empty, "not empty two clocks after write");
    step(0, 1);
    // random traffic
    for (int t = 0; t < 20000; t++) step($urandom_range(0, 99) < 55, $urandom_range(0, 99) < 50);
    // fill to full
    while (!full) step(1, 0);
    check(model.size() == DEPTH + 1, $sformatf("capacity %0d", model.size()));
    step(1, 0);
    check(model.size() == DEPTH + 1, "write while full ignored");
    // drain
    while (model.size() > 0) step(0, 1);
    repeat (3) step(0, 1);
    check(empty && words == 0, "drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
