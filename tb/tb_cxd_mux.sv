// tb_cxd_mux: all eight select words of the context/data mux with random
// context-block inputs, against the select table.
//
// Own test: reference values are computed independently in the testbench, not
// taken from the published architecture.
module tb_cxd_mux;
  import bpc_pkg::*;
  cntrl_cx_t sel;
  logic [4:0] zc_cx, sc_cx, mr_cx, cx;
  logic zc_d, sc_d, mr_d, d, valid;
  logic [1:0] zi;
  int checks = 0, failures = 0;
  cxd_mux dut (.cntrl_cx(sel), .zc_cx, .zc_d, .sc_cx, .sc_d, .mr_cx, .mr_d, .zi, .cx, .d, .valid);
  initial begin
    for (int t = 0; t < 200; t++) begin
      int ec, ed, ev;
      sel = cntrl_cx_t'(t % 8);
      zc_cx = 5'($urandom); sc_cx = 5'($urandom); mr_cx = 5'($urandom);
      zc_d = 1'($urandom); sc_d = 1'($urandom); mr_d = 1'($urandom); zi = 2'($urandom);
      #1;
      ev = 1;
      case (t % 8)
        1: begin ec = zc_cx; ed = zc_d; end
        2: begin ec = sc_cx; ed = sc_d; end
        3: begin ec = mr_cx; ed = mr_d; end
        4: begin ec = 17; ed = 0; end
        5: begin ec = 17; ed = 1; end
        6: begin ec = 18; ed = zi[1]; end
        7: begin ec = 18; ed = zi[0]; end
        default: begin ec = 0; ed = 0; ev = 0; end
      endcase
      checks++;
      if (int'(valid) != ev || (ev == 1 && (int'(cx) != ec || int'(d) != ed))) begin
        failures++;
        if (failures < 10) $display("FAIL sel=%0d cx=%0d d=%0d valid=%0d", t % 8, cx, d, valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
