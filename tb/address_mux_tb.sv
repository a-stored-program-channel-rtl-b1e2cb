// address_mux_tb: every source selected with random inputs.
module address_mux_tb;
  import spcc_pkg::*;
  int checks = 0, failures = 0;
  amux_sel_e   sel;
  logic [14:0] pc, ca0, ca1, evt_addr, addr, e;
  logic [23:0] dw_r;

  address_mux dut (.sel, .pc, .ca0, .ca1, .dw_r, .evt_addr, .addr);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      pc = 15'($urandom); ca0 = 15'($urandom); ca1 = 15'($urandom);
      evt_addr = 15'($urandom); dw_r = 24'($urandom);
      sel = amux_sel_e'(i % 5);
      #1;
      case (i % 5)
        0: e = pc;
        1: e = ca0;
        2: e = ca1;
        3: e = dw_r[14:0];
        default: e = evt_addr;
      endcase
      checks++;
      if (addr !== e) begin failures++; $display("FAIL sel=%0d addr=%o exp=%o", i % 5, addr, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
