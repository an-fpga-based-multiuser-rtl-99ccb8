// tb_stream_ctrl: random streams of packets (idle words, six header words
// with random fields, a random number of data words, sometimes an idle word
// inside the data). Checks after each word: the state (BUSY after data,
// PROGRAM after the first header word, PASS after further header words,
// IDLE after an idle word), prog_idx on header words, data_idx on data
// words (count since the header) and every decoded header field.
module tb_stream_ctrl;
  import pic_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  stream_t in;
  mod_state_t state;
  logic prog_en, proc_en, is_data, is_prog;
  logic [2:0] prog_idx;
  logic [10:0] data_idx;
  hdr_t hdr;
  stream_ctrl dut (.*);

  int checks = 0, failures = 0;
  int n_pass = 0, n_idle = 0, n_busy = 0, n_prog = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // Header word k written from the field layout of the header format.
  function automatic logic [9:0] hword(input logic [3:0] uid, input logic [5:0] sidx,
                                       input logic last, input logic acq,
                                       input logic [15:0] cfg, input logic [15:0] pn, input int k);
    case (k)
      0: return {sidx, uid};
      1: return {4'b0, last, acq, cfg[3:0]};
      2: return cfg[13:4];
      3: return {8'b0, cfg[15:14]};
      4: return pn[15:6];
      default: return {4'b0, pn[5:0]};
    endcase
  endfunction

  task automatic send(input logic p, input logic v, input logic [9:0] d);
    @(negedge clk);
    in = '0;
    in.prog = p; in.valid = v; in.data = d;
    in.rsvd = 4'($urandom);
  endtask

  initial begin
    int cnt;
    logic [3:0] uid; logic [5:0] sidx; logic last, acq; logic [15:0] cfg, pn;
    in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int pkt = 0; pkt < 400; pkt++) begin
      int nidle, ndata;
      nidle = $urandom % 3;
      ndata = 1 + $urandom % 40;   // headers are always followed by data
      repeat (nidle) begin
        send(1'b0, 1'b0, 10'($urandom));
        @(posedge clk); #1;
        check(state == ST_IDLE && !proc_en && !prog_en, "idle after invalid word");
        n_idle++;
      end
      uid = 4'($urandom); sidx = 6'($urandom); last = 1'($urandom); acq = 1'($urandom);
      cfg = 16'($urandom); pn = 16'($urandom);
      for (int k = 0; k < 6; k++) begin
        send(1'b1, 1'b1, hword(uid, sidx, last, acq, cfg, pn, k));
        #1 check(prog_idx == 3'(k), $sformatf("prog_idx %0d expected %0d", prog_idx, k));
        check(is_prog && !is_data, "is_prog on header word");
        @(posedge clk); #1;
        if (k == 0) begin
          check(state == ST_PROGRAM && prog_en, "PROGRAM after first header word");
          n_prog++;
        end else begin
          check(state == ST_PASS && !prog_en, "PASS after later header words");
          n_pass++;
        end
      end
      cnt = 0;
      for (int j = 0; j < ndata; j++) begin
        if ($urandom % 8 == 0) begin
          send(1'b0, 1'b0, '0);
          @(posedge clk); #1;
          check(state == ST_IDLE, "idle word inside data");
        end
        send(1'b0, 1'b1, 10'($urandom));
        #1 check(data_idx == 11'(cnt), $sformatf("data_idx %0d expected %0d", data_idx, cnt));
        check(is_data && !is_prog, "is_data on data word");
        check(hdr.uid == uid && hdr.sidx == sidx && hdr.last == last && hdr.acq == acq,
              "header control fields");
        check(hdr.cfg == cfg && hdr.pn == pn, "header cfg and pn");
        cnt++;
        @(posedge clk); #1;
        check(state == ST_BUSY && proc_en, "BUSY after data word");
        n_busy++;
      end
    end
    check(n_idle > 0 && n_busy > 0 && n_prog > 0 && n_pass > 0,
          $sformatf("all states visited: idle %0d busy %0d program %0d pass %0d", n_idle, n_busy, n_prog, n_pass));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
