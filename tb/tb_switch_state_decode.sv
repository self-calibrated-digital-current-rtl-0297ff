// tb_switch_state_decode: random legal gate patterns and current signs.
// The expected leg states are computed from gate values delayed by
// DRV_DLY = 5 clocks, with the deadtime rules S_HF = (i > 0), S_LF = (i < 0),
// and no_cross whenever a delayed leg has both gates off.
module tb_switch_state_decode;
  logic clk = 0, rst_n = 0;
  logic g_hs_hf, g_ls_hf, g_hs_lf, g_ls_lf, il_pos, il_neg;
  logic s_hf, s_lf, no_cross;
  int checks = 0, failures = 0;
  logic [3:0] hist[$];

  always #5 clk = ~clk;

  switch_state_decode dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] leg(int unsigned r);
    logic [1:0] v;
    v = (r % 3 == 1) ? 2'b10 : (r % 3 == 2) ? 2'b01 : 2'b00;
    return v;
  endfunction

  logic [3:0] d;
  logic [1:0] lh, ll;
  logic e_hf, e_lf, e_nc;
  initial begin
    {g_hs_hf, g_ls_hf, g_hs_lf, g_ls_lf, il_pos, il_neg} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 5; k++) hist.push_back(4'b0);
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      lh = leg($urandom);
      ll = leg($urandom);
      g_hs_hf = lh[1]; g_ls_hf = lh[0];
      g_hs_lf = ll[1]; g_ls_lf = ll[0];
      case ($urandom % 3) 0: {il_pos, il_neg} = 2'b10; 1: {il_pos, il_neg} = 2'b01;
                          default: {il_pos, il_neg} = 2'b00; endcase
      #1;
      d = hist.pop_front();
      e_hf = d[3] ? 1'b1 : d[2] ? 1'b0 : il_pos;
      e_lf = d[1] ? 1'b1 : d[0] ? 1'b0 : il_neg;
      e_nc = (d[3:2] == 2'b00) || (d[1:0] == 2'b00);
      checks++;
      if (s_hf !== e_hf || s_lf !== e_lf || no_cross !== e_nc) begin
        failures++;
        $display("i=%0d d=%b: got %b%b%b exp %b%b%b", i, d, s_hf, s_lf, no_cross,
                 e_hf, e_lf, e_nc);
      end
      hist.push_back({g_hs_hf, g_ls_hf, g_hs_lf, g_ls_lf});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
