// tb_line_memory: a 16-slot line memory is filled over fields of random
// length, some shorter than the memory, some longer (overflow), some with a
// sample in the very cycle of `field_start`. The testbench keeps its own copy
// of what each field stored and expects every read to return the previous
// field's value for the same slot, `ff_valid` only for slots that the
// previous field wrote, and `overflow` for samples beyond slot 15.
module tb_line_memory;
  import lcp_pkg::*;
  localparam int unsigned DEPTH = 16;
  logic clk = 1'b0, rst_n = 1'b0, field_start = 1'b0, wr = 1'b0;
  io_t  wdata = '0, ff_data;
  logic ff_valid, overflow;
  logic [$clog2(DEPTH+1)-1:0] slot;
  int checks = 0, failures = 0;
  io_t prev [DEPTH], cur [DEPTH];
  int  prev_n = 0, cur_n = 0;
  int  n_valid = 0, n_overflow = 0, n_coincident = 0;

  line_memory #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .field_start, .wr, .wdata,
                                    .ff_data, .ff_valid, .slot, .overflow);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one write; `fs` also starts a new field in the same cycle
  task automatic write(input logic fs);
    int  s;
    io_t d;
    if (fs) begin
      prev = cur; prev_n = cur_n; cur_n = 0;
      n_coincident++;
    end
    s = cur_n;
    d = io_t'($urandom);
    field_start = fs;
    wr = 1'b1;
    wdata = d;
    @(negedge clk);
    field_start = 1'b0;
    wr = 1'b0;
    if (s < DEPTH) begin
      check(ff_valid === (s < prev_n), $sformatf("ff_valid slot %0d", s));
      if (s < prev_n) begin
        check(ff_data === prev[s], $sformatf("slot %0d: %0d expected %0d", s, ff_data, prev[s]));
        n_valid++;
      end
      check(!overflow, "unexpected overflow");
      cur[s] = d;
      cur_n = s + 1;
    end else begin
      check(overflow && !ff_valid, "overflow expected");
      n_overflow++;
    end
    repeat ($urandom_range(0, 2)) @(negedge clk);
  endtask

  task automatic new_field();
    prev = cur; prev_n = cur_n; cur_n = 0;
    field_start = 1'b1;
    @(negedge clk) field_start = 1'b0;
    check(slot == 0, "slot not back at 0");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int f = 0; f < 30; f++) begin
      int n;
      n = (f % 4 == 3) ? DEPTH + 3 : $urandom_range(1, DEPTH);
      if (f % 5 == 2) begin
        write(1'b1);
        n--;
      end else begin
        new_field();
      end
      for (int k = 0; k < n; k++) write(1'b0);
    end
    check(n_valid > 0 && n_overflow > 0 && n_coincident > 0, "all cases exercised");
    $display("replayed=%0d overflow=%0d coincident=%0d", n_valid, n_overflow, n_coincident);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
