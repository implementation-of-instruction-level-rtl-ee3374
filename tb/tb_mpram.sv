// tb_mpram: self-checking test of the CRCW multiport RAM.
//
// Two memories are tested side by side against a behavioural model:
//   * the reference example chip at its default size (16 ports,
//     16384 x 1 bit) with CRCW Common writes, and
//   * a 16-port 256 x 8 bit memory with CRCW Priority writes.
// Every cycle all 16 ports issue a random read or write; addresses are drawn
// from a small window half of the time so that concurrent reads and
// concurrent writes to one word are frequent. Reads are checked during the
// cycle (they see the old contents); conflicting writes must follow the
// Common (all writers agree) or Priority (lowest port wins) rule. All ports
// are served in one cycle, so one access per port per clock is checked.
module tb_mpram;
  localparam int P = 16;
  localparam int WA = 16384, WB = 256;
  logic clk = 0;
  logic [P-1:0] cs_a, we_a, cs_b, we_b;
  logic [P-1:0][13:0] addr_a;
  logic [P-1:0][7:0]  addr_b;
  logic [P-1:0][0:0]  din_a, dout_a;
  logic [P-1:0][7:0]  din_b, dout_b;
  logic       model_a [WA];
  logic [7:0] model_b [WB];
  int checks = 0, failures = 0, conflicts = 0, cycles = 0;

  mpram dut_a (.clk(clk), .cs(cs_a), .we(we_a), .addr(addr_a), .din(din_a), .dout(dout_a));
  mpram #(.PORTS(P), .WORDS(WB), .WIDTH(8), .PRIORITY(1'b1)) dut_b (
    .clk(clk), .cs(cs_b), .we(we_b), .addr(addr_b), .din(din_b), .dout(dout_b));

  always #5 clk = ~clk;

  initial begin : watchdog
    #10_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic fail(string m);
    failures++;
    if (failures < 10) $display("FAIL cycle %0d: %s", cycles, m);
  endtask

  initial begin
    logic written_a [WA];
    logic written_b [WB];
    // initialise both memories: all 16 ports write distinct words each cycle
    cs_a = '1; we_a = '1; cs_b = '0; we_b = '0;
    for (int base = 0; base < WA; base += P) begin
      @(negedge clk);
      for (int p = 0; p < P; p++) begin
        addr_a[p] = 14'(base + p); din_a[p] = 1'($urandom); model_a[base + p] = din_a[p];
        if (base < WB) begin
          cs_b[p] = 1; we_b[p] = 1; addr_b[p] = 8'(base + p); din_b[p] = 8'($urandom);
          model_b[base + p] = din_b[p];
        end else begin cs_b[p] = 0; end
      end
    end
    @(negedge clk);
    for (int n = 0; n < 3000; n++) begin
      cycles++;
      cs_a = P'($urandom) | P'($urandom); we_a = P'($urandom);
      cs_b = P'($urandom) | P'($urandom); we_b = P'($urandom);
      for (int p = 0; p < P; p++) begin
        addr_a[p] = (n % 2) ? 14'($urandom % 8) : 14'($urandom);
        addr_b[p] = (n % 2) ? 8'($urandom % 4) : 8'($urandom);
        din_b[p]  = 8'($urandom);
      end
      // Common rule: every port writing a word writes the same bit
      for (int p = 0; p < P; p++) din_a[p] = ^addr_a[p] ^ 1'(n);
      #1;
      for (int p = 0; p < P; p++) begin
        if (cs_a[p]) begin checks++; if (dout_a[p] !== model_a[addr_a[p]]) fail($sformatf("A read p%0d", p)); end
        else         begin checks++; if (dout_a[p] !== 1'b0) fail("A idle port output"); end
        if (cs_b[p]) begin checks++; if (dout_b[p] !== model_b[addr_b[p]]) fail($sformatf("B read p%0d", p)); end
      end
      // model update (after the reads above)
      for (int p = 0; p < P; p++) begin written_a[addr_a[p]] = 0; written_b[addr_b[p]] = 0; end
      for (int p = 0; p < P; p++) begin
        if (cs_a[p] && we_a[p]) begin
          if (written_a[addr_a[p]]) conflicts++;
          model_a[addr_a[p]] = din_a[p]; written_a[addr_a[p]] = 1;
        end
        if (cs_b[p] && we_b[p]) begin
          if (written_b[addr_b[p]]) conflicts++;
          else model_b[addr_b[p]] = din_b[p];   // lowest port wins
          written_b[addr_b[p]] = 1;
        end
      end
      @(negedge clk);
    end
    // final sweep of the Priority memory through all ports
    cs_b = '1; we_b = '0;
    for (int base = 0; base < WB; base += P) begin
      for (int p = 0; p < P; p++) addr_b[p] = 8'(base + p);
      #1;
      for (int p = 0; p < P; p++) begin checks++; if (dout_b[p] !== model_b[base + p]) fail("B sweep"); end
      @(negedge clk);
    end
    $display("concurrent-write conflicts resolved: %0d", conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
