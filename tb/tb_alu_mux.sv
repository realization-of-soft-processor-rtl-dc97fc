// tb_alu_mux: drives 32 distinct random words and checks that each of
// the 32 selection codes returns its own input, over several rounds.
module tb_alu_mux;
  localparam int W = 15;
  logic [31:0][W-1:0] in_data;
  logic [4:0]         sel;
  logic [W-1:0]       out_data;
  logic [W-1:0]       ref_words [32];
  int checks = 0, failures = 0;

  alu_mux #(.W(W)) dut (.in_data(in_data), .sel(sel), .out_data(out_data));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 20; r++) begin
      for (int i = 0; i < 32; i++) begin
        ref_words[i] = W'($urandom) ^ W'(i);  // distinct low bits per slot
        ref_words[i][4:0] = 5'(i);
        in_data[i] = ref_words[i];
      end
      for (int s = 0; s < 32; s++) begin
        sel = 5'(s);
        #1;
        checks++;
        if (out_data !== ref_words[s]) begin
          failures++;
          $display("FAIL sel=%0d got=%0h exp=%0h", s, out_data, ref_words[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
