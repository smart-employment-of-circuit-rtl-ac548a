// tb_pass_switches -- random requests through the pass switches: a request
// is dropped (selects cleared, isolated_o high) exactly when isolation is
// enabled, the memory matches and it is a bus transaction; address and data
// always pass.
module tb_pass_switches;
  import avs_pkg::*;
  int checks = 0, failures = 0;
  avs_req_t req, out;
  logic en, match, isolated;

  pass_switches dut (.req_i(req), .filter_en_i(en), .match_i(match), .req_o(out), .isolated_o(isolated));

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      logic drop;
      req = avs_req_t'({$urandom, $urandom});
      en = 1'($urandom); match = 1'($urandom);
      #1;
      drop = en && match && (req.read || req.write);
      checks++;
      if (isolated !== drop || out.read !== (req.read && !drop) || out.write !== (req.write && !drop)
          || out.address !== req.address || out.writedata !== req.writedata) begin
        failures++; $display("FAIL req %h en %b match %b -> %h iso %b", req, en, match, out, isolated);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
