// tb_dwm_racetrack: self-checking testbench of the racetrack model.
//
// Applies random pairs of micro-operations (shift left, shift right,
// shift-based write, nothing) to a 10-domain wire and compares every read
// head with an array model after every cycle. The model's stale end domains
// are included, so the test also checks what is pushed off and left behind.
`timescale 1ns/1ps
module tb_dwm_racetrack;
  import dwm_pkg::*;
  localparam int W = 8, D = 10, NRH = 5;
  logic clk = 0;
  rt_op_e op [2];
  logic [W-1:0] wdata = '0;
  logic [W-1:0] rd_head [NRH];
  logic [W-1:0] m [D];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  dwm_racetrack #(.WIDTH(W), .DOMAINS(D), .WPOS(0), .NRH(NRH), .RH_FIRST(0), .RH_STEP(2),
                  .OPS(2)) dut (.clk(clk), .op(op), .wdata(wdata), .rd_head(rd_head));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op[0] = RT_WR; op[1] = RT_SHR;
    // fill the wire with known values first: write + shift right D times
    for (int i = 0; i < D; i++) begin
      @(negedge clk); op[0] = RT_WR; op[1] = RT_SHR; wdata = W'(i + 1);
    end
    @(negedge clk); op[0] = RT_NOP; op[1] = RT_NOP;
    // after D write+shift pairs, domain i holds D - i (domain 0 the last write, shifted once)
    for (int i = 0; i < D; i++) m[i] = W'((i == 0) ? D : D - i + 1);
    #1;
    for (int k = 0; k < NRH; k++)
      check(rd_head[k] == m[2*k], $sformatf("after fill head %0d = %h expected %h", k, rd_head[k], m[2*k]));
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      op[0] = rt_op_e'($urandom_range(3));
      op[1] = rt_op_e'($urandom_range(3));
      wdata = W'($urandom);
      for (int s = 0; s < 2; s++) begin
        case (op[s])
          RT_SHR: for (int i = D - 1; i > 0; i--) m[i] = m[i-1];
          RT_SHL: for (int i = 0; i < D - 1; i++) m[i] = m[i+1];
          RT_WR:  m[0] = wdata;
          default: ;
        endcase
      end
      @(posedge clk); #1;
      for (int k = 0; k < NRH; k++)
        check(rd_head[k] == m[2*k], $sformatf("head %0d = %h expected %h", k, rd_head[k], m[2*k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
