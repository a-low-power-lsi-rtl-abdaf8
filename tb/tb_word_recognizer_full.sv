// Full-size testbench of the word recognizer: one complete operation at the
// sizes of the main configuration, an 86-frame (1 s) utterance scored against
// 1000 word models, with the design at its default parameters.
module tb_word_recognizer_full;
  tb_top_harness #(.W(1000), .T(86), .MAXCYC(20_000_000)) h ();
endmodule
