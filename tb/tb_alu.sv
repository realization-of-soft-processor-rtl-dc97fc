// tb_alu: checks the complete ALU (arithmetic unit, logic unit, 32:1
// multiplexer, flags) for every selection code, including the ten unused
// ones, against the integer reference model, with corner operands and
// random operands. Zero flag: result zero; sign flag: bit 7 of result.
module tb_alu;
  import sp_ref_pkg::*;
  localparam int YW = 15;
  logic [7:0]    a, b;
  logic [4:0]    sel;
  logic [YW-1:0] y;
  logic          zero, sign;
  int checks = 0, failures = 0;
  int zero_seen = 0, sign_seen = 0;

  alu #(.Y_W(YW)) dut (.a(a), .b(b), .sel(sel), .y(y), .zero(zero), .sign(sign));

  task automatic try(input int ia, input int ib, input int op);
    int e;
    a = 8'(ia); b = 8'(ib); sel = 5'(op);
    #1;
    e = alu_ref(op, ia, ib, YW);
    checks++;
    if (int'(y) != e || zero != (e == 0) || sign != ((e / 128) % 2 == 1)) begin
      failures++;
      if (failures < 10) $display("FAIL op=%0d a=%0h b=%0h y=%0h z=%0b s=%0b exp=%0h", op, ia, ib, y, zero, sign, e);
    end
    if (zero) zero_seen++;
    if (sign) sign_seen++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int corners[6] = '{0, 1, 127, 128, 254, 255};
    for (int op = 0; op < 32; op++) begin
      foreach (corners[i]) foreach (corners[j]) try(corners[i], corners[j], op);
      for (int k = 0; k < 300; k++) try(int'($urandom % 256), int'($urandom % 256), op);
    end
    checks++;
    if (zero_seen == 0 || sign_seen == 0) begin
      failures++;
      $display("FAIL flags never set: zero %0d sign %0d", zero_seen, sign_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
