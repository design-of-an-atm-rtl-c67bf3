// Testbench for header_processor: loads a routing table, then offers idle
// cells, unassigned cells and user cells. Idle cells must be flagged and
// routed nowhere; user cells must get their table entry and a header with
// the new VPI/VCI and a HEC recomputed here bit by bit (CRC-8, polynomial
// x^8+x^2+x+1, XOR 0x55), with the payload untouched.
module tb_header_processor;
  import atm_pkg::*;
  localparam int CW = 424;
  logic          clk = 0;
  logic          cfg_we = 0;
  logic [5:0]    cfg_addr = '0;
  route_t        cfg_data = '0;
  logic [CW-1:0] cell_in;
  logic          cell_in_valid;
  logic          user, idle_drop;
  route_t        route;
  logic [CW-1:0] cell_out;
  route_t        tbl [64];
  int checks = 0, failures = 0;

  header_processor dut (.*);

  always #5 clk = ~clk;

  function automatic logic [7:0] ref_hec(logic [31:0] h);
    // long division of h * x^8 by x^8 + x^2 + x + 1
    logic [39:0] r;
    r = {h, 8'h00};
    for (int b = 39; b >= 8; b--)
      if (r[b]) r[b -: 9] = r[b -: 9] ^ 9'b1_0000_0111;
    return r[7:0] ^ 8'h55;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    // ITU example: the idle cell header 00 00 00 01 has HEC 0x52
    chk(ref_hec(32'h0000_0001) == 8'h52, "reference HEC of idle header");
    chk(atm_hec(32'h0000_0001) == 8'h52, "package HEC of idle header");
    for (int a = 0; a < 64; a++) begin
      tbl[a] = route_t'({$urandom, $urandom});
      if (a % 7 == 0) tbl[a].out_mask = '0;
      @(negedge clk);
      cfg_we = 1; cfg_addr = 6'(a); cfg_data = tbl[a];
    end
    @(negedge clk) cfg_we = 0;
    for (int n = 0; n < 300; n++) begin
      logic [39:0] h;
      logic [15:0] vci;
      cell_in = {14{$urandom}};
      cell_in_valid = ($urandom_range(0, 5) != 0);
      if (n % 5 == 0) h = {32'h0000_0001, 8'h52};
      else begin
        vci = 16'($urandom);
        h = {4'($urandom), 8'($urandom), vci, 3'($urandom), 1'b0, 8'($urandom)};
      end
      cell_in[CW-1 -: 40] = h;
      #1;
      if (n % 5 == 0) begin
        chk(user === 1'b0 && idle_drop === cell_in_valid, "idle cell dropped");
      end else if (!cell_in_valid) begin
        chk(user === 1'b0 && idle_drop === 1'b0, "no cell");
      end else begin
        route_t      r;
        logic [39:0] nh;
        r  = tbl[vci[5:0]];
        nh = {h[39:36], r.new_vpi, r.new_vci, h[11:8], 8'h00};
        nh[7:0] = ref_hec(nh[39:8]);
        chk(user === 1'b1 && idle_drop === 1'b0, "user cell accepted");
        chk(route === r, "route entry");
        chk(cell_out === {nh, cell_in[CW-41:0]}, $sformatf("header %h exp %h", cell_out[CW-1 -: 40], nh));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
