// lam_patch_panel_tb: random LAM and front-panel patterns through a panel
// with non-default patching, compared with the routing worked out here.
module lam_patch_panel_tb;
  int checks = 0, failures = 0;
  logic [47:0] lam;
  logic [3:0]  ext_event, event_req;
  logic        lam_pi;
  localparam int EL [4] = '{5, 30, -1, 47};
  localparam logic [47:0] PM = 48'h8000_0000_0101;

  lam_patch_panel #(.NLAM(48), .EVENT_LAM(EL), .PI_MASK(PM)) dut (.lam, .ext_event, .event_req, .lam_pi);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] e;
    for (int i = 0; i < 300; i++) begin
      lam       = {$urandom, $urandom} & {16'hFFFF, 32'hFFFF_FFFF};
      if (i % 3 == 0) lam = 48'd1 << ($urandom % 48);
      ext_event = 4'($urandom);
      #1;
      e[0] = ext_event[0] | lam[5];
      e[1] = ext_event[1] | lam[30];
      e[2] = ext_event[2];
      e[3] = ext_event[3] | lam[47];
      checks++;
      if (event_req !== e || lam_pi !== (lam[0] | lam[8] | lam[47])) begin
        failures++;
        $display("FAIL lam=%h ext=%b req=%b exp=%b pi=%b", lam, ext_event, event_req, e, lam_pi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
