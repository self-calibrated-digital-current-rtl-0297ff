// deadtime_leg: break-before-make gate control for one half bridge.
//
// Takes the wanted conducting switch of a leg (want_hs, want_ls, never both;
// neither means leg off) and produces the two gate signals. A gate turns off
// at once; the other gate turns on only after both have been off for DT
// clocks, so the two switches are never on together.
//
// Interface: gates are registered; a change of request shows on the gates
// one clock later for turn-off and DT+1 clocks later for turn-on of the
// other switch. Used twice by mode_deadtime_gen.
module deadtime_leg #(
  parameter int DT = 5                 // deadtime in 10 ns clocks
) (
  input  logic clk,
  input  logic rst_n,
  input  logic want_hs,
  input  logic want_ls,
  output logic g_hs,
  output logic g_ls
);

  localparam int CW = $clog2(DT + 2);

  logic [CW-1:0] off_cnt;              // clocks with both gates off
  logic          ok;

  assign ok = (off_cnt >= CW'(DT));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_hs    <= 1'b0;
      g_ls    <= 1'b0;
      off_cnt <= '0;
    end else begin
      if ((g_hs && !want_hs) || (g_ls && !want_ls)) begin
        g_hs    <= 1'b0;
        g_ls    <= 1'b0;
        off_cnt <= '0;
      end else if (!g_hs && !g_ls) begin
        if (ok && want_hs)      g_hs <= 1'b1;
        else if (ok && want_ls) g_ls <= 1'b1;
        if (!ok) off_cnt <= off_cnt + 1'b1;
      end
    end
  end

  a_break_before_make: assert property (@(posedge clk) disable iff (!rst_n)
                                        !(g_hs && g_ls));

endmodule
