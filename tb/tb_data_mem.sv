// tb_data_mem: self-checking testbench of the 256 x 8 data memory.
// Random Wishbone writes and reads against a reference array; checks read
// data, that a read does not modify memory, and that ack comes in the cycle
// right after the strobe cycle (seen two sampling edges after it is driven).
module tb_data_mem;
  import gumnut_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic cyc = 1'b0, stb = 1'b0, we = 1'b0, ack;
  logic [7:0] adr = '0, din = '0, dout;

  data_mem dut (.clk_i(clk), .rst_i(rst), .cyc_i(cyc), .stb_i(stb), .we_i(we),
                .adr_i(adr), .dat_i(din), .dat_o(dout), .ack_o(ack));

  int checks = 0, failures = 0;
  logic [7:0] model [256];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic access(input logic w, input logic [7:0] a, input logic [7:0] d,
                        output logic [7:0] q, output int lat);
    @(posedge clk);
    cyc <= 1'b1; stb <= 1'b1; we <= w; adr <= a; din <= d;
    lat = 0;
    do begin @(posedge clk); lat++; end while (!ack);
    q = dout;
    cyc <= 1'b0; stb <= 1'b0; we <= 1'b0;
  endtask

  initial begin
    logic [7:0] q, a, d;
    int lat;
    for (int i = 0; i < 256; i++) model[i] = 8'h00;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < 256; i++) begin
      access(1'b1, 8'(i), 8'(i ^ 8'h3C), q, lat);
      model[i] = 8'(i ^ 8'h3C);
      check(lat == 2, $sformatf("write ack latency %0d", lat));
    end
    for (int i = 0; i < 1500; i++) begin
      a = 8'($urandom()); d = 8'($urandom());
      if ($urandom_range(0, 1) == 1) begin
        access(1'b1, a, d, q, lat);
        model[a] = d;
      end else begin
        access(1'b0, a, d, q, lat);
        check(q == model[a], $sformatf("read %02h = %02h expected %02h", a, q, model[a]));
        check(lat == 2, $sformatf("read ack latency %0d", lat));
      end
    end
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
