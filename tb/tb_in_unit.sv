// tb_in_unit: drives DMB-like events through the input unit and compares
// the memory words with hand-worked expectations for each trailer case of
// the alignment tables: normal, one/two/three words lost before the trailer,
// an E-code word lost, a damaged first or second E-code.  Also checks that
// idles, receive-error words and the post-reset freeze are not stored, and
// that the last word of a normal event is written within three clocks.
// Then 300 random normal events with random idle gaps (never inside the
// trailer, whose E-codes a DMB sends back to back) and random receive-error
// words are compared word for word.
module tb_in_unit;
  import in5_pkg::*;
  localparam int FRZ = 9;
  logic clk = 0, rst = 1;
  logic [15:0] rx_data = '0;
  logic rx_isk = 1, rx_err = 0;
  logic wen, evt_end, ecode_err, dav;
  logic [35:0] wdata;
  logic [35:0] got [$], exp_q [$];
  int checks = 0, failures = 0, n_ecode_err = 0, n_end = 0, n_rand = 0;
  int last_e_time, last_row_time;
  int cyc = 0;

  in_unit #(.FREEZE(FRZ)) dut (.clk, .rst, .rx_data, .rx_isk, .rx_err, .wen, .wdata,
                               .evt_end, .ecode_err, .dav);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (!rst && wen) begin
      got.push_back(wdata);
      if (wdata[17] || wdata[35]) last_row_time = cyc;
    end
    if (!rst && ecode_err) n_ecode_err++;
    if (!rst && evt_end) n_end++;
  end

  // halves: 'X' data, 'E' E-code, 'B' damaged E-code
  function automatic logic [15:0] hv(byte c, int i);
    case (c)
      "E": return 16'hE000 | 16'(i);
      "B": return 16'h6000 | 16'(i);
      default: return 16'h1000 | 16'(i);
    endcase
  endfunction

  task automatic send(logic [15:0] w);
    rx_data = w; rx_isk = 0; rx_err = 0;
    @(posedge clk); #1;
  endtask
  task automatic idle(int n);
    rx_isk = 1; rx_data = IDLE_WORD;
    repeat (n) @(posedge clk);
    #1;
  endtask

  function automatic logic [35:0] row(logic [15:0] lo, logic [15:0] hi,
                                      logic flo, logic fhi, logic llo, logic lhi);
    return {lhi, fhi, hi, llo, flo, lo};
  endfunction

  // Send the halves of string s; expect rows: fills appended to the last
  // group where padf says so, LAST flags on the first row of the last group.
  task automatic event_case(string s, int nfill, logic llo, logic lhi, bit trailing_idle);
    logic [15:0] h [$];
    logic        f [$];
    int n;
    for (int i = 0; i < s.len(); i++) begin
      h.push_back(hv(s[i], i));
      f.push_back(0);
    end
    for (int i = 0; i < s.len(); i++) begin
      send(h[i]);
      if (s[i] == "E") last_e_time = cyc;
      // a receive-error word in the middle must be skipped
      if (i == 2) begin rx_err = 1; rx_data = 16'hDEAD; @(posedge clk); #1; rx_err = 0; end
    end
    for (int i = 0; i < nfill; i++) begin h.push_back(FILL_WORD); f.push_back(1); end
    n = h.size();
    for (int r = 0; r < n / 2; r++) begin
      bit first_of_last = (r == n / 2 - 2);
      exp_q.push_back(row(h[2*r], h[2*r+1], f[2*r], f[2*r+1],
                          first_of_last & llo, first_of_last & lhi));
    end
    if (trailing_idle) idle(6);
  endtask

  task automatic compare(string name);
    idle(6);
    checks++;
    if (got.size() != exp_q.size()) begin
      failures++;
      $display("FAIL %s: %0d rows, expected %0d", name, got.size(), exp_q.size());
    end else begin
      for (int i = 0; i < got.size(); i++)
        if (++checks > 0 && got[i] != exp_q[i]) begin
          failures++;
          $display("FAIL %s row %0d: %h expected %h", name, i, got[i], exp_q[i]);
        end
    end
    got.delete(); exp_q.delete();
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // words during the freeze are dropped
    for (int i = 0; i < FRZ - 1; i++) send(16'h1234);
    idle(4);
    checks++;
    if (got.size() != 0) begin failures++; $display("FAIL stored during freeze"); end
    got.delete();

    event_case("XXXXXXXXEEEE", 0, 0, 1, 1);  compare("normal");
    checks++;
    if (last_row_time - last_e_time > 3) begin
      failures++; $display("FAIL last word %0d clocks after last E-code", last_row_time - last_e_time);
    end
    event_case("XXXXXXXEEEE", 1, 1, 1, 1);   compare("lost 1 word");
    event_case("XXXXXXEEEE", 2, 1, 1, 1);    compare("lost 2 words");
    event_case("XXXXXEEEE", 3, 1, 1, 1);     compare("lost 3 words");
    event_case("XXXXXXXXEEE", 1, 0, 1, 1);   compare("lost E-code word");
    event_case("XXXXXXXXBEEE", 0, 0, 1, 1);  compare("bad 1st E-code");
    checks++;
    if (n_ecode_err != 1) begin failures++; $display("FAIL ecode_err count %0d", n_ecode_err); end
    // bad 2nd E-code, next event follows without idle
    event_case("XXXXXXXXEBEE", 0, 0, 1, 0);
    event_case("XXXXEEEE", 0, 0, 1, 1);      compare("bad 2nd E-code + back-to-back");
    checks++;
    if (n_ecode_err != 2) begin failures++; $display("FAIL ecode_err count %0d", n_ecode_err); end
    checks++;
    if (n_end != 8) begin failures++; $display("FAIL event ends %0d, expected 8", n_end); end

    // random normal events: random data, idle gaps outside the trailer,
    // receive-error words anywhere; every memory word is compared
    for (int e = 0; e < 300; e++) begin
      automatic int ng = $urandom_range(2, 16);
      automatic logic [15:0] h [$];
      for (int i = 0; i < 4 * (ng - 1); i++) h.push_back({4'($urandom_range(1, 13)), 12'($urandom)});
      for (int i = 0; i < 4; i++) h.push_back(16'hE000 | 16'($urandom_range(0, 4095)));
      foreach (h[i]) begin
        if (i < h.size() - 3 && $urandom_range(0, 99) < 10) idle($urandom_range(1, 3));
        if ($urandom_range(0, 99) < 5) begin
          rx_err = 1; rx_isk = 0; rx_data = 16'($urandom); @(posedge clk); #1; rx_err = 0;
        end
        send(h[i]);
      end
      for (int r = 0; r < h.size() / 2; r++)
        exp_q.push_back(row(h[2*r], h[2*r+1], 1'b0, 1'b0, 1'b0, r == h.size() / 2 - 2));
      if (e % 50 == 49) compare($sformatf("random events to %0d", e));
      n_rand++;
    end
    compare("random events, rest");
    checks++;
    if (n_end != 308) begin failures++; $display("FAIL event ends %0d, expected 308", n_end); end
    checks++;
    if (n_ecode_err != 2) begin failures++; $display("FAIL ecode_err on clean events"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
