// tb_memory: writes the whole 1024 x 8 memory through port B with a
// pattern, reads it back through port A (processor port) and port B, and
// checks the one-cycle read latency, that port A holds its output when
// chip select or memrd is low, and that a port-B access with chip select
// low neither writes nor reads. A shadow array is the reference.
module tb_memory;
  localparam int DEPTH = 1024;
  logic       clk = 0;
  logic       cs_a, rd_a, cs_b, we_b;
  logic [9:0] addr_a, addr_b;
  logic [7:0] din_b, dout_a, dout_b;
  logic [7:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  memory dut (.clk, .cs_a, .rd_a, .addr_a, .dout_a, .cs_b, .we_b, .addr_b, .din_b, .dout_b);

  always #5 clk = ~clk;

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0h exp=%0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cs_a = 0; rd_a = 0; cs_b = 0; we_b = 0; addr_a = 0; addr_b = 0; din_b = 0;
    // fill through port B
    for (int i = 0; i < DEPTH; i++) begin
      shadow[i] = 8'((i * 37 + 11) ^ (i >> 3));
      @(negedge clk);
      cs_b = 1; we_b = 1; addr_b = 10'(i); din_b = shadow[i];
    end
    @(negedge clk); cs_b = 0; we_b = 0;
    // read every word through port A, check latency of one clock
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      cs_a = 1; rd_a = 1; addr_a = 10'(i);
      @(negedge clk);
      cs_a = 0; rd_a = 0;
      chk("portA", int'(dout_a), int'(shadow[i]));
    end
    // port B read back of a few words
    for (int i = 0; i < DEPTH; i += 97) begin
      @(negedge clk); cs_b = 1; we_b = 0; addr_b = 10'(i);
      @(negedge clk); cs_b = 0;
      chk("portB", int'(dout_b), int'(shadow[i]));
    end
    // output held when memrd low or chip select low
    @(negedge clk); cs_a = 1; rd_a = 1; addr_a = 10'd5;
    @(negedge clk); cs_a = 1; rd_a = 0; addr_a = 10'd6;
    @(negedge clk); chk("hold rd=0", int'(dout_a), int'(shadow[5]));
    cs_a = 0; rd_a = 1; addr_a = 10'd7;
    @(negedge clk); chk("hold cs=0", int'(dout_a), int'(shadow[5]));
    // write with chip select low is ignored
    cs_a = 0; rd_a = 0;
    cs_b = 0; we_b = 1; addr_b = 10'd9; din_b = ~shadow[9];
    @(negedge clk); we_b = 0;
    cs_a = 1; rd_a = 1; addr_a = 10'd9;
    @(negedge clk); cs_a = 0; rd_a = 0;
    chk("cs_b=0 write ignored", int'(dout_a), int'(shadow[9]));
    // lowest and highest address
    cs_b = 1; we_b = 1; addr_b = 10'h3FF; din_b = 8'hA5;
    @(negedge clk); addr_b = 10'h000; din_b = 8'h5A;
    @(negedge clk); cs_b = 0; we_b = 0; cs_a = 1; rd_a = 1; addr_a = 10'h3FF;
    @(negedge clk); chk("3FFH", int'(dout_a), 'hA5); addr_a = 10'h000;
    @(negedge clk); chk("000H", int'(dout_a), 'h5A); cs_a = 0; rd_a = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
