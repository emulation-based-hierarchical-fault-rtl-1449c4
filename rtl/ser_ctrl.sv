// ser_ctrl: soft-error-rate (SER) control mechanism.
//
// Decides when a fault is injected. A down-counter divides time into injection
// slots of `period` cycles (0 or 1 means every cycle), the first slot being the
// first enabled cycle. At each slot a free-running LFSR of RATE_W bits is compared
// with the rate threshold and the fault_inject pulse fi is raised when
// lfsr <= rate. Since the LFSR runs through
// 1..2^RATE_W-1 evenly, one slot fires with probability rate / (2^RATE_W - 1):
// with the default 20 bits, rate = 151 gives 0.0144 % and rate = 22020 gives 2.10 %,
// the two ends of the range used in the evaluation. rate = 0 never fires.
//
// Timing: fi is a registered one-cycle pulse; fi_count counts pulses since reset.
// Only the counter/LFSR/comparator structure and the role of the block come from
// the framework description; the slot counter, threshold encoding and widths are
// this design's choices.
module ser_ctrl #(
  parameter int unsigned          RATE_W = 20,
  parameter int unsigned          PER_W  = 16,
  parameter logic [RATE_W-1:0]    SEED   = RATE_W'(32'h5A5A5)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,        // campaign running
  input  logic [RATE_W-1:0] rate,      // threshold: probability rate/(2^RATE_W-1) per slot
  input  logic [PER_W-1:0]  period,    // slot length in cycles
  output logic              fi,        // fault_inject pulse
  output logic [31:0]       fi_count
);
  logic [RATE_W-1:0] rnd;
  logic [PER_W-1:0]  slot_ctr;
  logic              slot;

  lfsr #(.W(RATE_W), .SEED(SEED)) u_lfsr (.clk, .rst_n, .en(1'b1), .q(rnd));

  assign slot = (slot_ctr == '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      slot_ctr <= '0;
      fi       <= 1'b0;
      fi_count <= '0;
    end else begin
      if (!en)       slot_ctr <= '0;
      else if (slot) slot_ctr <= (period > PER_W'(1)) ? period - PER_W'(1) : '0;
      else           slot_ctr <= slot_ctr - PER_W'(1);
      fi <= en && slot && (rnd <= rate) && (rate != '0);
      if (en && slot && (rnd <= rate) && (rate != '0)) fi_count <= fi_count + 32'd1;
    end
  end
endmodule
