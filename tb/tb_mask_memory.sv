// Self-checking testbench for mask_memory: fills the memory, then mixes
// random reads and writes against a reference array, checking the one-cycle
// read latency and old-data-on-collision behaviour.
module tb_mask_memory;
  localparam int N = 8, K = 4;
  logic clk = 0, we = 0;
  logic [K-1:0] waddr = '0, raddr = '0;
  logic [N-1:0] wdata = '0, rdata;
  logic [N-1:0] ref_m [2**K];
  logic [N-1:0] want;
  int checks = 0, failures = 0;

  mask_memory #(.N(N), .K(K)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    for (int a = 0; a < 2**K; a++) begin
      we = 1; waddr = K'(a); wdata = N'($urandom); ref_m[a] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    for (int c = 0; c < 500; c++) begin
      raddr = K'($urandom);
      we    = $urandom_range(0, 2) == 0;
      waddr = ($urandom_range(0, 3) == 0) ? raddr : K'($urandom);
      wdata = N'($urandom);
      want  = ref_m[raddr];
      @(posedge clk);
      if (we) ref_m[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== want) begin
        failures++;
        $display("read %0d got %h want %h", raddr, rdata, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
