// tb_instruction_capture: self-checking testbench of the instruction capture.
// Characters are fed straight into the (rx_data_i, rx_valid_i) input. The
// expected memory writes are worked out by a reference that builds the
// stream from known words (hex digits least-significant first) and compares
// every write, in order. Covered: the example stream XXYX[50800][158C2]
// [005F2]Y (words 00805, 2C851, 2F500 at addresses 0..2); cfg_mode and
// load_done; lower-case digits; short and empty words; digits beyond the
// fifth; stray characters; 'Y' outside load mode; an 'X' in the middle of
// a load restarting at address 0; 200 random words.
module tb_instruction_capture;
  import gumnut_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  byte_t  rxd = '0;
  logic   rxv = 1'b0;
  logic   we, cfg, ldone;
  iaddr_t addr, words;
  inst_t  wdata;

  instruction_capture dut (.clk_i(clk), .rst_i(rst), .rx_data_i(rxd), .rx_valid_i(rxv),
                           .im_we_o(we), .im_addr_o(addr), .im_wdata_o(wdata),
                           .cfg_mode_o(cfg), .load_done_o(ldone), .words_o(words));

  typedef struct packed { iaddr_t a; inst_t d; } wr_t;
  wr_t exp_wr [$];
  int  checks = 0, failures = 0, n_done = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    if (!rst && we) begin
      wr_t e;
      if (exp_wr.size() == 0) check(0, $sformatf("unexpected write %03h <- %05h", addr, wdata));
      else begin
        e = exp_wr.pop_front();
        check(e.a == addr && e.d == wdata,
              $sformatf("write %03h <- %05h, expected %03h <- %05h", addr, wdata, e.a, e.d));
      end
    end
    if (!rst && ldone) n_done++;
  end

  task automatic put(byte_t c);
    @(posedge clk);
    rxd <= c; rxv <= 1'b1;
    @(posedge clk);
    rxv <= 1'b0;
    repeat (3) @(posedge clk);   // characters arrive far apart in the system
  endtask

  task automatic put_string(string s);
    for (int i = 0; i < s.len(); i++) put(s[i]);
  endtask

  function automatic string hexdig(int v, bit lower);
    string h;
    h = lower ? "0123456789abcdef" : "0123456789ABCDEF";
    return h.substr(v, v);
  endfunction

  // "[" + five digits, least-significant first + "]"
  function automatic string word_str(logic [19:0] w, bit lower);
    string s;
    s = "[";
    for (int k = 0; k < 5; k++) s = {s, hexdig(int'(w[4*k +: 4]), lower)};
    return {s, "]"};
  endfunction

  initial begin
    iaddr_t a;
    logic [17:0] w;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    check(!cfg, "load mode after reset");

    // the document's example
    put_string("XX");
    check(cfg, "X did not enter load mode");
    put_string("Y");
    check(!cfg && n_done == 1, "Y did not leave load mode");
    put_string("X");
    exp_wr.push_back('{a: 12'd0, d: 18'h00805});
    exp_wr.push_back('{a: 12'd1, d: 18'h2C851});
    exp_wr.push_back('{a: 12'd2, d: 18'h2F500});
    put_string("[50800][158C2][005F2]");
    check(cfg && words == 12'd3, $sformatf("after 3 words: cfg=%0b words=%0d", cfg, words));
    put_string("Y");
    check(!cfg && n_done == 2, "example load did not finish");
    check(exp_wr.size() == 0, "example writes missing");

    // 'Y' outside load mode, and brackets outside load mode, do nothing
    put_string("Y[12345]");
    check(n_done == 2 && !cfg, "characters outside load mode had an effect");

    // odd words
    put_string("X");
    exp_wr.push_back('{a: 12'd0, d: 18'h0000A});           // [A]
    exp_wr.push_back('{a: 12'd1, d: 18'h3fedc & 18'h3FFFF}); // [cdef3] lower case
    exp_wr.push_back('{a: 12'd2, d: 18'h12345 & 18'h3FFFF}); // [5432199] extra digits
    put_string("[A] z [cdef3] [] [5432199] q");
    // X in the middle restarts the load at address 0
    exp_wr.push_back('{a: 12'd0, d: 18'h00001});
    put_string("[10X[1]");
    check(words == 12'd1, $sformatf("restart: %0d words", words));
    put_string("Y");

    // random program
    put_string("X");
    for (int i = 0; i < 200; i++) begin
      w = 18'($urandom());
      exp_wr.push_back('{a: 12'(i), d: w});
      put_string(word_str({2'b00, w}, i % 2 == 1));
    end
    put_string("Y");
    check(exp_wr.size() == 0, $sformatf("%0d writes missing", exp_wr.size()));
    check(n_done == 4, $sformatf("load_done pulses %0d, expected 4", n_done));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
