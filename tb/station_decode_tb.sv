// station_decode_tb: checks every station number with the decoder enabled
// and disabled against a one-hot line computed here.
module station_decode_tb;
  int checks = 0, failures = 0;
  logic        en;
  logic [4:0]  n;
  logic [23:0] nline, exp_l;

  station_decode #(.NSTA(24)) dut (.en, .n, .nline);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int i = 0; i < 32; i++) begin
        en = e[0];
        n  = 5'(i);
        #1;
        exp_l = (e == 1 && i >= 1 && i <= 24) ? (24'd1 << (i - 1)) : 24'd0;
        checks++;
        if (nline !== exp_l) begin
          failures++;
          $display("FAIL en=%0d n=%0d nline=%h expected %h", e, i, nline, exp_l);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
