// tb_fetch3: feeds random cache answers (count 1..K, per-lane FIFO readiness)
// into fetch3 and checks that it takes an answer only when every needed lane
// is ready, that it enqueues exactly the valid lanes, and the per-instruction
// pc, predicted next pc and epoch.
module tb_fetch3;
  import ooo_pkg::*;
  localparam int unsigned K = SUP_K;
  logic in_valid, in_ready;
  fetch_req_t in_req;
  inst_t in_inst [K];
  logic [K-1:0] in_ivalid, enq_valid, enq_rdy;
  fetched_inst_t enq_data [K];

  fetch3 #(.K(K)) dut (.*);

  int checks = 0, failures = 0, n_stall = 0, n_wide = 0;
  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #1000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int cnt; bit all_rdy;
      cnt = $urandom_range(1, K);
      in_valid = ($urandom_range(0, 4) != 0);
      in_req.pc = 64'h8000_0000 + {$urandom_range(0, 1023), 2'b00};
      in_req.ppc = 64'h9000_0000 + {$urandom_range(0, 1023), 2'b00};
      in_req.epoch = epoch_t'($urandom);
      in_req.count = cnt[$bits(in_req.count)-1:0];
      for (int i = 0; i < K; i++) begin
        in_inst[i] = $urandom;
        in_ivalid[i] = (i < cnt);
        enq_rdy[i] = ($urandom_range(0, 5) != 0);
      end
      #1;
      all_rdy = 1;
      for (int i = 0; i < cnt; i++) if (!enq_rdy[i]) all_rdy = 0;
      check("in_ready", in_ready, all_rdy);
      if (in_valid && !all_rdy) n_stall++;
      if (in_valid && all_rdy && cnt == K) n_wide++;
      for (int i = 0; i < K; i++) begin
        check("enq_valid", enq_valid[i], in_valid && all_rdy && i < cnt);
        if (i < cnt) begin
          check("pc", enq_data[i].pc, in_req.pc + 4 * i);
          check("ppc", enq_data[i].ppc, (i == cnt - 1) ? in_req.ppc : in_req.pc + 4 * (i + 1));
          check("epoch", enq_data[i].epoch, in_req.epoch);
          check("inst", enq_data[i].inst, in_inst[i]);
        end
      end
      #9;
    end
    check("stalls", n_stall > 10, 1);
    check("wide", n_wide > 10, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
