// tb_atu_controller: exhaustive check of the request decoder. Every
// combination of enable, mode, data request/op and instruction request is
// applied and both V2P control words and the probe flag are compared with
// the expected decode.
module tb_atu_controller;
  import atu_pkg::*;

  int checks = 0, failures = 0;
  logic     xlate_en, supervisor, dreq_valid, ireq_valid, probe;
  mem_op_e  dreq_op;
  v2p_ctl_t dctl, ictl;
  logic clk = 0;

  atu_controller dut (
    .xlate_en(xlate_en), .supervisor(supervisor), .dreq_valid(dreq_valid),
    .dreq_op(dreq_op), .ireq_valid(ireq_valid), .dctl(dctl), .ictl(ictl), .probe(probe)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static mem_op_e ops [3] = '{OP_LOAD, OP_STORE, OP_PROBE};
    for (int i = 0; i < 16; i++) begin
      foreach (ops[o]) begin
        bit en, sup, dv, iv;
        bit [3:0] exp_d, exp_i;
        bit exp_p;
        {en, sup, dv, iv} = 4'(i);
        xlate_en = en; supervisor = sup; dreq_valid = dv; ireq_valid = iv;
        dreq_op = ops[o];
        #1;
        exp_d = {dv, dv && (o == 1), sup, en};
        exp_i = {iv, 1'b0, sup, en};
        exp_p = dv && (o == 2);
        checks += 3;
        if (dctl !== exp_d) begin failures++; $display("FAIL dctl %b exp %b", dctl, exp_d); end
        if (ictl !== exp_i) begin failures++; $display("FAIL ictl %b exp %b", ictl, exp_i); end
        if (probe !== exp_p) begin failures++; $display("FAIL probe %b exp %b", probe, exp_p); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
