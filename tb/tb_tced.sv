// tb_tced: edge detector check. Every ideal thermometer word (codes 0..63),
// plus random words with bubbles, is applied; each output bit is compared with
// "this bit is 1 and the bit above is 0" evaluated bit by bit.
module tb_tced;
  localparam int NQ = 63;
  logic [NQ-1:0] dc, de;
  int checks = 0, failures = 0;

  tced #(.NQ(NQ)) dut (.dc(dc), .de(de));

  task automatic check_word();
    logic exp;
    #1;
    for (int j = 0; j < NQ; j++) begin
      exp = dc[j] && (j == NQ - 1 || !dc[j+1]);
      checks++;
      if (de[j] !== exp) begin
        failures++;
        $display("FAIL dc=%h j=%0d de=%b", dc, j, de[j]);
      end
    end
  endtask

  initial begin
    for (int c = 0; c <= NQ; c++) begin
      dc = (c == 0) ? '0 : NQ'((64'(1) << c) - 1);
      check_word();
      checks++;
      if (c == 0 ? (de != 0) : (de != NQ'(64'(1) << (c - 1)))) begin
        failures++;
        $display("FAIL one-hot code %0d de=%h", c, de);
      end
    end
    for (int k = 0; k < 200; k++) begin
      dc = {$urandom, $urandom};
      check_word();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
