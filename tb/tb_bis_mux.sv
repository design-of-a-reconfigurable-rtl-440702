// Testbench for bis_mux: every select value picks that channel's raw record
// and record number; an out-of-range select gives channel 0.
module tb_bis_mux;
  import bis_pkg::*;
  logic [1:0] sel;
  raw_t raw_in [3];
  logic [FIDX_W-1:0] addr_in [3];
  raw_t raw_o;
  logic [FIDX_W-1:0] addr_o;
  int checks = 0, failures = 0;

  bis_mux #(.N(3)) dut (.sel_in(sel), .raw_in, .addr_in, .raw_out(raw_o), .addr_out(addr_o));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20; t++) begin
      for (int i = 0; i < 3; i++) begin
        raw_in[i]  = raw_t'($urandom);
        addr_in[i] = FIDX_W'($urandom);
      end
      for (int s = 0; s < 4; s++) begin
        sel = 2'(s);
        #1;
        checks++;
        if (raw_o != raw_in[s < 3 ? s : 0] || addr_o != addr_in[s < 3 ? s : 0]) begin
          failures++; $display("FAIL sel=%0d", s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
