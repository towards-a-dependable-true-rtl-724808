// output_buffer - 20 Kbit store that releases a dataset only once it passed.
//
// Output bits are packed LSB-first into 32-bit words and written into a
// 640 x 32 (20 Kbit) block RAM while the FIPS tests examine the same
// dataset. When the verdict for the dataset arrives, a pass starts a
// read-out of its BITS/32 words, one word per clock on out_word/out_valid; a
// fail simply leaves the words to be overwritten, so numbers that did not
// pass never leave the generator. The next dataset is written from address 0
// as soon as the previous one is complete. Because the read-out moves one
// word per clock and writing one word takes 32 accepted bits, reading stays
// ahead of writing provided the verdict arrives within 32 input bits of the
// end of a dataset (the FIPS tests answer 17 clocks after their last bit and
// a post-processed bit takes 100 clocks or more).
//
// Interface: clear drops the dataset being written (the tests were
// restarted); verdict_valid/verdict_pass grade the last complete dataset;
// released pulses when a read-out ends, dropped when a failed dataset is
// discarded. The consumer must take one word per clock while out_valid is
// high.
// Follows the source design: 20 Kb of block RAM holding generated numbers
// until all tests have run. Own choices: word width, packing, read-out
// protocol without back-pressure.
module output_buffer #(
  parameter int unsigned BITS  = 20000,
  parameter int unsigned WORD  = 32,
  parameter int unsigned DEPTH = 640
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            clear,
  input  logic            in_valid,
  input  logic            in_bit,
  input  logic            verdict_valid,
  input  logic            verdict_pass,
  output logic            out_valid,
  output logic [WORD-1:0] out_word,
  output logic            released,
  output logic            dropped
);

  localparam int unsigned NWORDS = (BITS + WORD - 1) / WORD;
  localparam int unsigned AW     = $clog2(DEPTH);
  localparam int unsigned BW     = $clog2(BITS + 1);
  localparam int unsigned PW     = $clog2(WORD);

  logic [WORD-1:0] mem [DEPTH];

  logic [WORD-1:0] wword;
  logic [PW-1:0]   wpos;
  logic [AW-1:0]   waddr;
  logic [BW-1:0]   wbits;
  logic            we;
  logic [WORD-1:0] wdata;
  logic [AW-1:0]   wa;

  logic            reading;
  logic [AW-1:0]   raddr;

  initial begin
    assert (NWORDS <= DEPTH) else $error("output_buffer: BITS do not fit");
  end

  // write side
  always_ff @(posedge clk) begin
    if (rst || clear) begin
      wword <= '0;
      wpos  <= '0;
      waddr <= '0;
      wbits <= '0;
      we    <= 1'b0;
    end else begin
      we <= 1'b0;
      if (in_valid) begin
        logic [WORD-1:0] nw;
        nw       = wword;
        nw[wpos] = in_bit;
        if (wpos == PW'(WORD - 1) || wbits == BW'(BITS - 1)) begin
          we    <= 1'b1;
          wdata <= nw;
          wa    <= waddr;
          wword <= '0;
          wpos  <= '0;
          waddr <= (wbits == BW'(BITS - 1)) ? '0 : waddr + 1'b1;
        end else begin
          wword <= nw;
          wpos  <= wpos + 1'b1;
        end
        wbits <= (wbits == BW'(BITS - 1)) ? '0 : wbits + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (we) mem[wa] <= wdata;
  end

  // read side
  always_ff @(posedge clk) begin
    if (rst) begin
      reading   <= 1'b0;
      raddr     <= '0;
      out_valid <= 1'b0;
      released  <= 1'b0;
      dropped   <= 1'b0;
    end else begin
      released  <= 1'b0;
      dropped   <= 1'b0;
      out_valid <= reading;
      if (verdict_valid && !reading) begin
        if (verdict_pass) begin
          reading <= 1'b1;
          raddr   <= '0;
        end else begin
          dropped <= 1'b1;
        end
      end else if (reading) begin
        if (raddr == AW'(NWORDS - 1)) begin
          reading  <= 1'b0;
          released <= 1'b1;
        end
        raddr <= raddr + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (reading) out_word <= mem[raddr];
  end

endmodule
