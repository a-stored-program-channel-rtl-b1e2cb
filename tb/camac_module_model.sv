// camac_module_model: behavioural model of a simple CAMAC module, for
// simulation only. One 24-bit data register:
//   F0  read (R lines driven while N and F are present), Q = q_resp
//   F2  read, then clear the register and the LAM at S2 (as an ADC does)
//   F16 write at S1, Q = q_resp
//   F8  test LAM (Q = LAM), F10 clear LAM at S2
// The testbench sets the data and LAM through 'load'/'load_data'/'set_lam'.
module camac_module_model
  import spcc_pkg::*;
(
  input  logic            clk,
  input  logic            n,
  input  logic [4:0]      f,
  input  logic            s1,
  input  logic            s2,
  input  logic [DW_W-1:0] w,
  input  logic            q_resp,
  input  logic            load,
  input  logic [DW_W-1:0] load_data,
  input  logic            set_lam,
  output logic [DW_W-1:0] r,
  output logic            q,
  output logic            lam,
  output logic [DW_W-1:0] data
);
  logic s1_d = 1'b0, s2_d = 1'b0;
  int   n_write = 0, n_clear = 0;

  initial begin data = '0; lam = 1'b0; end

  always @(posedge clk) begin
    s1_d <= s1;
    s2_d <= s2;
    if (load) data <= load_data;
    if (set_lam) lam <= 1'b1;
    if (n && s1 && !s1_d && f == 5'd16) begin data <= w; n_write++; end
    if (n && s2 && !s2_d && f == 5'd2)  begin data <= '0; lam <= 1'b0; n_clear++; end
    if (n && s2 && !s2_d && f == 5'd10) lam <= 1'b0;
  end

  always_comb begin
    r = (n && (f == 5'd0 || f == 5'd2)) ? data : '0;
    q = 1'b0;
    if (n) q = (f == 5'd8) ? lam : q_resp;
  end
endmodule
