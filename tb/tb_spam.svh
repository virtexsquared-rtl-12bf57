// SPAM master task for testbenches; needs cclk, spamo (driven) and spami (sampled) in scope.
// The request is valid for one cclk cycle; busy_b is looked for on the following falling edges.
// Returns the cycles waited in spam_wait; 0xDEADDEAD after 300 cycles without an answer.
int spam_wait;
task automatic spam_rw(input bit rnw, input logic [3:0] did, input logic [23:0] addr,
                       input logic [31:0] wdata, output logic [31:0] rdata);
  @(negedge cclk);
  spamo = '{valid: 1'b1, r_nw: rnw, did: did, addr: addr, data: wdata};
  @(negedge cclk);
  spamo = '0;
  rdata = 32'hDEADDEAD;
  for (spam_wait = 1; spam_wait < 300; spam_wait++) begin
    if (spami.busy_b) begin
      rdata = spami.data;
      break;
    end
    @(negedge cclk);
  end
endtask
task automatic spam_wr(input logic [3:0] did, input logic [23:0] addr, input logic [31:0] wdata);
  logic [31:0] dummy;
  spam_rw(1'b0, did, addr, wdata, dummy);
  check(spam_wait < 300, $sformatf("SPAM write to %0h:%0h acknowledged", did, addr));
endtask
