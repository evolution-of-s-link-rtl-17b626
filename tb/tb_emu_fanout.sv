// tb_emu_fanout: self-checking test of the FILAR emulator routing.  Normal
// mode: each channel sees its own link and drives its own XOFF.  Emulator
// mode: every channel sees link 0 and link 0's XOFF is the OR of all
// channels' XOFF lines.  Random inputs, compared with the rule.
module tb_emu_fanout;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic        emu_mode;
  logic [3:0]  link_valid, link_ctrl, link_down, link_xoff;
  logic [31:0] link_data [4];
  logic [3:0]  ch_valid, ch_ctrl, ch_down, ch_xoff;
  logic [31:0] ch_data [4];

  emu_fanout dut (.*);

  initial begin
    for (int n = 0; n < 400; n++) begin
      emu_mode   = n[0];
      link_valid = 4'($urandom); link_ctrl = 4'($urandom); link_down = 4'($urandom);
      ch_xoff    = ($urandom_range(3) == 0) ? 4'(1 << $urandom_range(3)) : 4'h0;
      for (int i = 0; i < 4; i++) link_data[i] = $urandom;
      #1;
      for (int i = 0; i < 4; i++) begin
        int s;
        s = emu_mode ? 0 : i;
        check(ch_valid[i] == link_valid[s] && ch_ctrl[i] == link_ctrl[s] &&
              ch_down[i] == link_down[s] && ch_data[i] == link_data[s], "channel input routing");
      end
      if (emu_mode) check(link_xoff[0] == (ch_xoff != 0), "link 0 XOFF is the OR");
      else          check(link_xoff == ch_xoff, "own XOFF per link");
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
